// tb_scah_chain_group -- self-checking test of the parallel scan-chain group,
// at 8 chains x 7 lines. Random gse, line select, si[] and di[][] each cycle;
// so[] is checked before the rising edge (the selected line's word, or si[]
// when no line is selected) and every register after it, against a model in
// which a line is one 8-bit memory word.
module tb_scah_chain_group;
  localparam int C = 8, L = 7;
  int checks = 0, failures = 0;
  logic clk = 0, reset, gse;
  logic [L:1] ls;
  logic [C-1:0] si, so, exp_so;
  logic [C-1:0][L:1] di, do_q, model;
  int sel;

  scah_chain_group #(.CHAINS(C), .LINES(L)) dut (
    .clk(clk), .reset(reset), .gse(gse), .ls(ls), .si(si), .so(so), .di(di), .do_q(do_q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; gse = 0; ls = '0; si = '0; di = '0; model = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (do_q !== model) begin
        failures++;
        $display("FAIL cycle %0d register mismatch", i);
      end
      gse = ($urandom_range(3, 0) != 0);
      sel = $urandom_range(L, 0);
      ls  = '0;
      if (sel != 0) ls[sel] = 1'b1;
      si  = C'($urandom);
      for (int c = 0; c < C; c++) di[c] = L'($urandom);
      #1;
      for (int c = 0; c < C; c++) exp_so[c] = (sel != 0) ? model[c][sel] : si[c];
      checks++;
      if (so !== exp_so) begin
        failures++;
        $display("FAIL cycle %0d gse=%0b line=%0d so=%h expected %h", i, gse, sel, so, exp_so);
      end
      @(posedge clk);
      if (!gse) model = di;
      else if (sel != 0)
        for (int c = 0; c < C; c++) model[c][sel] = si[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

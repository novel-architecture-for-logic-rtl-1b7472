// tb_scah_scan_chain -- self-checking test of one SCAh scan chain (31 lines).
// Each cycle drives a random gse, line select (one line or none), si and di
// on the falling clock edge. Before the rising edge it checks so against a
// register-level model: the selected register's value, or si when no line is
// selected. After the edge it checks all 31 register outputs: a selected line
// under gse = 1 took si, other lines held, and under gse = 0 every register
// took its di.
module tb_scah_scan_chain;
  localparam int L = 31;
  int checks = 0, failures = 0;
  logic clk = 0, reset, gse, si, so, exp_so;
  logic [L:1] ls, di, do_q, model;
  int sel;

  scah_scan_chain #(.LINES(L)) dut (
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
    reset = 1; gse = 0; ls = '0; si = 0; di = '0; model = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (do_q !== model) begin
        failures++;
        $display("FAIL cycle %0d do=%h expected %h", i, do_q, model);
      end
      gse = 1'($urandom);
      sel = $urandom_range(L, 0);       // 0 = no line
      ls  = '0;
      if (sel != 0) ls[sel] = 1'b1;
      si  = 1'($urandom);
      di  = L'($urandom);
      #1;
      exp_so = (sel != 0) ? model[sel] : si;
      checks++;
      if (so !== exp_so) begin
        failures++;
        $display("FAIL cycle %0d gse=%0b line=%0d so=%0b expected %0b", i, gse, sel, so, exp_so);
      end
      @(posedge clk);
      if (!gse)          model = di;
      else if (sel != 0) model[sel] = si;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scahs_top -- end-to-end test of the SCAhS at its default size
// (32 chains x 31 lines = 992 registers), with a small stand-in for the logic
// under test: next state = own bit XOR the bit one chain up and one line on.
//
// Phases, each cycle checked against a register-level model (so[] before
// the rising edge, all 992 register outputs after it):
//   1. load a full test pattern with single-cycle writes, one line per
//      cycle: the whole 992-bit state must be loaded in exactly 31 cycles
//   2. read every line back with single-cycle read/write cycles
//   3. hold: scan enabled with no line selected, and with the decoder disabled
//   4. one functional capture cycle, then read the response line by line
//   5. at-speed run with one line observed continuously (async read)
//   6. a random mix of all of the above, then an asynchronous reset
// Every mechanism (sync write/read, hold, decoder-disabled hold, functional
// capture, async read, reset) is counted and must have occurred.
module tb_scahs_top;
  import scahs_pkg::*;
  localparam int C = SCAHS_CHAINS, L = SCAHS_LINES, AW = SCAHS_ADDR_W;

  int checks = 0, failures = 0;
  int n_sync_rw = 0, n_hold = 0, n_hold_en0 = 0, n_func = 0, n_async_rd = 0, n_reset = 0;
  logic clk = 0, reset, gse, en;
  logic [AW-1:0] add;
  logic [C-1:0] si, so, exp_so;
  logic [C-1:0][L:1] func_d, func_q, model, pattern;

  scahs_top dut (
    .clk(clk), .reset(reset), .gse(gse), .en(en), .add(add),
    .si(si), .so(so), .func_d(func_d), .func_q(func_q)
  );

  // stand-in for the combinational logic under test
  always_comb
    for (int c = 0; c < C; c++)
      for (int k = 1; k <= L; k++)
        func_d[c][k] = func_q[c][k] ^ func_q[(c + 1) % C][(k % L) + 1];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sel_line();
    return (en && add >= 1 && int'(add) <= L) ? int'(add) : 0;
  endfunction

  // one clock cycle with the inputs already driven (after a falling edge)
  task automatic cycle();
    int s;
    #1;
    s = sel_line();
    for (int c = 0; c < C; c++) exp_so[c] = (s != 0) ? model[c][s] : si[c];
    checks++;
    if (so !== exp_so) begin
      failures++;
      $display("FAIL t=%0t gse=%0b en=%0b add=%0d so=%h expected %h", $time, gse, en, add, so, exp_so);
    end
    if (gse && s != 0)      n_sync_rw++;
    else if (gse && !en)    n_hold_en0++;
    else if (gse)           n_hold++;
    else if (s != 0)        begin n_async_rd++; n_func++; end
    else                    n_func++;
    @(posedge clk);
    if (!gse)        model = func_d_of(model);
    else if (s != 0) for (int c = 0; c < C; c++) model[c][s] = si[c];
    @(negedge clk);
    checks++;
    if (func_q !== model) begin
      failures++;
      $display("FAIL t=%0t register state differs from model", $time);
    end
  endtask

  function automatic logic [C-1:0][L:1] func_d_of(input logic [C-1:0][L:1] q);
    logic [C-1:0][L:1] d;
    for (int c = 0; c < C; c++)
      for (int k = 1; k <= L; k++)
        d[c][k] = q[c][k] ^ q[(c + 1) % C][(k % L) + 1];
    return d;
  endfunction

  function automatic logic [C-1:0] line_of(input logic [C-1:0][L:1] a, input int k);
    logic [C-1:0] w;
    for (int c = 0; c < C; c++) w[c] = a[c][k];
    return w;
  endfunction

  int t0, t1;

  initial begin
    reset = 1; gse = 1; en = 0; add = '0; si = '0; model = '0;
    for (int c = 0; c < C; c++) pattern[c] = L'($urandom);
    repeat (2) @(negedge clk);
    reset = 0;
    n_reset++;
    @(negedge clk);

    // 1. load the whole pattern, one line per cycle
    t0 = int'($time / 10);
    for (int k = 1; k <= L; k++) begin
      gse = 1; en = 1; add = AW'(k); si = line_of(pattern, k);
      cycle();
    end
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != L) begin
      failures++;
      $display("FAIL full load took %0d cycles, expected %0d", t1 - t0, L);
    end
    checks++;
    if (func_q !== pattern) begin
      failures++;
      $display("FAIL loaded state differs from the pattern");
    end

    // 2. read every line back (writing the same word again)
    for (int k = L; k >= 1; k--) begin
      add = AW'(k); si = line_of(pattern, k);
      cycle();
      checks++;
      if (so !== line_of(pattern, k)) begin
        failures++;
        $display("FAIL read-back of line %0d", k);
      end
    end

    // 3. hold with no line selected, and with the decoder disabled
    for (int i = 0; i < 4; i++) begin
      en = 1; add = '0; si = C'($urandom);
      cycle();
      en = 0; add = AW'($urandom_range(L, 1)); si = C'($urandom);
      cycle();
    end

    // 4. one functional capture, then unload the response
    gse = 0; en = 1; add = '0;
    cycle();
    gse = 1;
    for (int k = 1; k <= L; k++) begin
      add = AW'(k); si = '0;
      cycle();
    end

    // 5. at-speed run with one line observed on so[] every cycle
    gse = 0; en = 1; add = AW'(7);
    repeat (20) cycle();

    // 6. random mix
    for (int i = 0; i < 400; i++) begin
      gse = ($urandom_range(3, 0) != 0);
      en  = ($urandom_range(7, 0) != 0);
      add = AW'($urandom);
      si  = C'($urandom);
      cycle();
    end

    // asynchronous reset between clock edges
    #2 reset = 1;
    #1;
    checks++;
    if (func_q !== '0) begin
      failures++;
      $display("FAIL reset did not clear the registers");
    end
    else n_reset++;
    model = '0;
    @(negedge clk);
    reset = 0;

    $display("mechanisms: sync_rw=%0d hold=%0d hold_decoder_off=%0d functional=%0d async_read=%0d reset=%0d",
             n_sync_rw, n_hold, n_hold_en0, n_func, n_async_rd, n_reset);
    checks += 6;
    if (n_sync_rw  == 0) begin failures++; $display("FAIL no sync write/read"); end
    if (n_hold     == 0) begin failures++; $display("FAIL no hold"); end
    if (n_hold_en0 == 0) begin failures++; $display("FAIL no decoder-disabled hold"); end
    if (n_func     == 0) begin failures++; $display("FAIL no functional cycle"); end
    if (n_async_rd == 0) begin failures++; $display("FAIL no async read"); end
    if (n_reset    <  2) begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scah_dff -- self-checking test of the D flip-flop.
// Random d each cycle (driven on the falling edge) must appear on q after the
// next rising edge, one cycle of latency; an asynchronous reset pulse between
// edges must clear q at once.
module tb_scah_dff;
  int checks = 0, failures = 0;
  logic clk = 0, reset, d, q, model;

  scah_dff dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; d = 0; model = 0;
    @(negedge clk);
    reset = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%0b expected %0b", i, q, model);
      end
      d = 1'($urandom);
      if (i % 50 == 49) begin
        // asynchronous reset between clock edges
        #1 reset = 1;
        #1;
        checks++;
        if (q !== 1'b0) begin
          failures++;
          $display("FAIL async reset did not clear q");
        end
        reset = 0;
        model = 0;
      end
      @(posedge clk);
      model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

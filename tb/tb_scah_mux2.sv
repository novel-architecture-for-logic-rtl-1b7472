// tb_scah_mux2 -- self-checking test of the 2-to-1 multiplexer.
// Checks every input combination of the single-bit cell and random values on
// an 8-bit instance against y = sel ? d1 : d0. Purely combinational: inputs
// are applied, then checked after a 1-time-unit settle.
module tb_scah_mux2;
  int checks = 0, failures = 0;
  logic       a0, a1, s, y1;
  logic [7:0] b0, b1, y8;

  scah_mux2           dut1 (.d0(a0), .d1(a1), .sel(s), .y(y1));
  scah_mux2 #(.WIDTH(8)) dut8 (.d0(b0), .d1(b1), .sel(s), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, a1, a0} = 3'(i);
      #1;
      checks++;
      if (y1 !== (s ? a1 : a0)) begin
        failures++;
        $display("FAIL 1-bit sel=%0b d1=%0b d0=%0b y=%0b", s, a1, a0, y1);
      end
    end
    for (int i = 0; i < 200; i++) begin
      b0 = 8'($urandom); b1 = 8'($urandom); s = 1'($urandom);
      #1;
      checks++;
      if (y8 !== (s ? b1 : b0)) begin
        failures++;
        $display("FAIL 8-bit sel=%0b d1=%h d0=%h y=%h", s, b1, b0, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scah_and_vec -- self-checking test of the bus-wide AND cell (31 bits).
// Random buses with en = 0 and en = 1, compared with a & {31{en}}.
module tb_scah_and_vec;
  int checks = 0, failures = 0;
  logic [30:0] a, y;
  logic        en;

  scah_and_vec dut (.a(a), .en(en), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a  = 31'($urandom);
      en = (i % 2 == 1);
      #1;
      checks++;
      if (y !== (en ? a : 31'd0)) begin
        failures++;
        $display("FAIL a=%h en=%0b y=%h", a, en, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

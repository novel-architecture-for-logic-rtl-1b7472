// tb_scah_decoder -- self-checking test of the 1-out-of-N line decoder
// (N = 31, 5-bit address). Every address with en = 0 and en = 1: line k must
// be the only select for add = k, en = 1; address 0 and en = 0 select nothing.
module tb_scah_decoder;
  int checks = 0, failures = 0;
  logic [4:0]  add;
  logic        en;
  logic [31:1] ls, expect_ls;

  scah_decoder dut (.add(add), .en(en), .ls(ls));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 32; a++) begin
        add = 5'(a);
        en  = 1'(e);
        expect_ls = '0;
        if (e == 1 && a >= 1) expect_ls[a] = 1'b1;
        #1;
        checks++;
        if (ls !== expect_ls) begin
          failures++;
          $display("FAIL add=%0d en=%0b ls=%h expected %h", a, e, ls, expect_ls);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scah_ff -- self-checking test of the SCAh flip-flop against its mode
// table. Each cycle drives random se, di and si on the falling clock edge,
// checks so (combinational: si in hold/functional, stored value in the two
// read modes) before the rising edge, and checks after the edge that the
// stored value became si (sync write/read), stayed (hold) or became di (the
// two functional modes). Every mode must occur.
module tb_scah_ff;
  import scahs_pkg::*;
  int checks = 0, failures = 0;
  int mode_seen [4];
  logic clk = 0, reset;
  logic [1:0] se;
  logic di, si, do_q, so, model, exp_so;
  scah_mode_e m;

  scah_ff dut (.clk(clk), .reset(reset), .se(se), .di(di), .si(si), .do_q(do_q), .so(so));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; se = 2'b00; di = 0; si = 0; model = 0;
    @(negedge clk);
    reset = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (do_q !== model) begin
        failures++;
        $display("FAIL cycle %0d do=%0b expected %0b", i, do_q, model);
      end
      se = 2'($urandom); di = 1'($urandom); si = 1'($urandom);
      m  = scah_mode(se[0], se[1]);
      mode_seen[m]++;
      #1;
      unique case (m)
        MODE_SYNC_RW, MODE_ASYNC_READ: exp_so = model;
        default:                       exp_so = si;
      endcase
      checks++;
      if (so !== exp_so) begin
        failures++;
        $display("FAIL cycle %0d mode %s so=%0b expected %0b", i, m.name(), so, exp_so);
      end
      @(posedge clk);
      unique case (m)
        MODE_SYNC_RW: model = si;
        MODE_HOLD:    model = model;
        default:      model = di;
      endcase
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (mode_seen[k] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_enc_ctrl: self-checking testbench for aes_enc_ctrl.
//
// Loads the controller several times (including once in mid-run) and checks
// the round-constant sequence 01 02 04 08 10 20 40 80 1b 36 6c against
// repeated doubling in GF(2^8), that final_round is high only on the tenth
// round (RC 0x36), that done rises exactly ten clocks after the load and that
// RC and done hold afterwards. A watchdog stops it if it hangs.
module tb_aes_enc_ctrl;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst;
  aes_byte_t rc;
  logic      final_round, done;

  aes_enc_ctrl dut (.clk(clk), .rst(rst), .rc(rc), .final_round(final_round), .done(done));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic load();
    @(negedge clk) rst = 1'b0;
    @(negedge clk) rst = 1'b1;
  endtask

  initial begin
    rst = 1'b1;
    for (int run = 0; run < 3; run++) begin
      logic [7:0] exp_rc;
      load();
      exp_rc = 8'h01;
      // after the load edge: rounds 1..10 use RC values 01..36
      for (int r = 1; r <= 10; r++) begin
        expect_eq($sformatf("run %0d round %0d rc", run, r), rc, exp_rc);
        expect_eq($sformatf("run %0d round %0d final", run, r), final_round, r == 10);
        expect_eq($sformatf("run %0d round %0d done", run, r), done, 0);
        if (run == 1 && r == 5) break;  // abandon this run: the next load restarts
        @(negedge clk);
        exp_rc = ref_mul(exp_rc, 8'h02);
      end
      if (run == 1) continue;
      expect_eq($sformatf("run %0d rc at done", run), rc, 8'h6c);
      expect_eq($sformatf("run %0d done", run), done, 1);
      repeat (4) @(negedge clk);
      expect_eq($sformatf("run %0d rc held", run), rc, 8'h6c);
      expect_eq($sformatf("run %0d done held", run), done, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_control - cycle-by-cycle check of the sequencer: no block start
// without a key, key setup (10 expansion steps writing key-buffer entries
// 9..0 after entry 10 in the accepting cycle), key priority over a waiting
// block, and the 1 + 10 cycle block sequence with the final round flagged.
module tb_aes_control;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic key_valid, blk_pending, blk_decrypt;
  ctl_t ctl;
  round_t round;
  logic key_ready, key_loaded;
  int checks = 0, failures = 0;

  aes_control dut (.clk(clk), .rst_n(rst_n), .key_valid(key_valid),
                   .blk_pending(blk_pending), .blk_decrypt(blk_decrypt),
                   .ctl(ctl), .round(round), .key_ready(key_ready),
                   .key_loaded(key_loaded));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++; $display("t=%0t %s (round=%0d ctl=%p)", $time, what, round, ctl);
    end
  endtask

  task automatic key_setup();
    @(negedge clk);
    key_valid = 1;
    #1;
    expect_true(key_ready && ctl.key_accept && ctl.kbuf_we && ctl.kbuf_from_in
                && ctl.kbuf_waddr == 4'd10 && !ctl.in_consume, "key accept cycle");
    @(negedge clk);
    key_valid = 0;
    for (int r = 1; r <= 10; r++) begin
      expect_true(!key_ready && ctl.key_step && ctl.kbuf_we && !ctl.kbuf_from_in
                  && round == 4'(r) && ctl.kbuf_waddr == 4'(10 - r)
                  && !ctl.state_load, $sformatf("key step %0d", r));
      @(negedge clk);
    end
    expect_true(key_ready && key_loaded && round == 0, "key setup complete");
  endtask

  task automatic run_block(logic dec);
    @(negedge clk);
    blk_pending = 1; blk_decrypt = dec;
    #1;
    expect_true(ctl.in_consume && ctl.state_load && ctl.sel_input && ctl.decrypt == dec
                && ctl.key_init && round == 0, "round 0");
    @(negedge clk);
    blk_pending = 0; blk_decrypt = ~dec;   // mode must have been latched
    for (int r = 1; r <= 10; r++) begin
      expect_true(ctl.state_load && !ctl.sel_input && ctl.decrypt == dec
                  && round == 4'(r) && ctl.last_round == (r == 10)
                  && ctl.out_load == (r == 10) && !key_ready, $sformatf("round %0d", r));
      @(negedge clk);
    end
    expect_true(key_ready && !ctl.state_load && !ctl.out_load, "idle after block");
  endtask

  initial begin
    key_valid = 0; blk_pending = 0; blk_decrypt = 0;
    #12 rst_n = 1;
    // A block without a key must wait.
    @(negedge clk); blk_pending = 1; #1;
    expect_true(!ctl.in_consume && !ctl.state_load && !key_loaded, "no start without key");
    @(negedge clk); blk_pending = 0;
    key_setup();
    run_block(1'b0);
    run_block(1'b1);
    // Key and block offered together: the key goes first.
    @(negedge clk); blk_pending = 1; key_valid = 1; #1;
    expect_true(ctl.key_accept && !ctl.in_consume, "key has priority");
    @(negedge clk); key_valid = 0; blk_pending = 0;
    repeat (10) @(negedge clk);
    expect_true(key_loaded && key_ready, "second key loaded");
    run_block(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

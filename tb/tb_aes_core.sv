// tb_aes_core - end-to-end test of the AES-128 core at its default size.
//
// Runs the FIPS-197 Appendix C.1 vector in both directions, then random keys
// and blocks in both directions against the reference model, including
// blocks offered while the core is busy (taken into the input buffer and
// started back to back), direction changes between consecutive blocks, a key
// change between blocks, and a key offered together with a waiting block.
// Every result is checked, the latency from taking a block into an idle core
// to out_valid is checked to be 12 cycles, and the number of cycles between
// back-to-back results to be 11. Each mechanism must occur at least once.
module tb_aes_core;
  import aes_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_valid, key_ready, key_loaded;
  blk   key_in;
  logic in_valid, in_decrypt, in_ready;
  blk   in_data;
  logic out_valid;
  blk   out_data;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Mechanism counters.
  int n_key_setup = 0, n_encrypt = 0, n_decrypt = 0, n_buffered = 0;
  int n_mode_switch = 0, n_rekey = 0, n_key_priority = 0;

  aes_core dut (
    .clk(clk), .rst_n(rst_n),
    .key_valid(key_valid), .key_in(key_in), .key_ready(key_ready), .key_loaded(key_loaded),
    .in_valid(in_valid), .in_decrypt(in_decrypt), .in_data(in_data), .in_ready(in_ready),
    .out_valid(out_valid), .out_data(out_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Expected results in order, with the cycle each block was taken.
  blk   exp_q [$];
  int   take_q [$];
  int   mode_q [$];   // timing check: 0 latency from idle, 1 back-to-back, 2 none
  int   last_out_cycle = -1;
  logic last_mode = 1'bx;
  int   n_results = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      blk e; int t; int tm;
      n_results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected result %h", out_data);
      end else begin
        e = exp_q.pop_front(); t = take_q.pop_front(); tm = mode_q.pop_front();
        if (out_data !== e) begin
          failures++; $display("result %0d: got %h expected %h", n_results, out_data, e);
        end
        if (tm == 0) begin
          checks++;
          if (cycle - t != 12) begin
            failures++; $display("latency %0d cycles, expected 12", cycle - t);
          end
        end
        if (tm == 1) begin
          checks++;
          if (cycle - last_out_cycle != 11) begin
            failures++; $display("back-to-back spacing %0d cycles, expected 11", cycle - last_out_cycle);
          end
        end
      end
      last_out_cycle = cycle;
    end
  end

  task automatic load_key(blk k);
    @(negedge clk);
    key_valid = 1; key_in = k;
    while (!key_ready) @(negedge clk);
    @(negedge clk);
    key_valid = 0; key_in = ~k;
    while (!key_loaded || !key_ready) @(negedge clk);
    n_key_setup++;
    if (n_key_setup > 1) n_rekey++;
  endtask

  task automatic send(blk k, blk d, logic dec);
    logic busy;
    busy = (exp_q.size() != 0);
    @(negedge clk);
    in_valid = 1; in_data = d; in_decrypt = dec;
    while (!in_ready) @(negedge clk);
    exp_q.push_back(dec ? decrypt(k, d) : encrypt(k, d));
    take_q.push_back(cycle + 1);
    mode_q.push_back(busy ? 1 : 0);
    if (busy) n_buffered++;
    if (dec) n_decrypt++; else n_encrypt++;
    if (last_mode !== 1'bx && last_mode != dec) n_mode_switch++;
    last_mode = dec;
    @(negedge clk);
    in_valid = 0; in_data = ~d;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    blk k, p, c;
    key_valid = 0; key_in = 0; in_valid = 0; in_decrypt = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C.1.
    k = 128'h000102030405060708090a0b0c0d0e0f;
    p = 128'h00112233445566778899aabbccddeeff;
    c = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    checks += 2;
    if (encrypt(k, p) !== c) begin failures++; $display("model encrypt wrong"); end
    if (decrypt(k, c) !== p) begin failures++; $display("model decrypt wrong"); end
    load_key(k);
    send(k, p, 0);
    drain();
    send(k, c, 1);
    drain();

    // Random keys; blocks sent back to back with random directions.
    for (int n = 0; n < 6; n++) begin
      k = rand_blk();
      load_key(k);
      for (int b = 0; b < 8; b++) send(k, rand_blk(), 1'($urandom_range(1, 0)));
      drain();
    end

    // Key offered in the same cycle the controller could start a waiting block.
    k = rand_blk();
    load_key(k);
    send(k, rand_blk(), 0);
    drain();
    begin
      blk k2 = rand_blk();
      blk d  = rand_blk();
      @(negedge clk);
      in_valid = 1; in_data = d; in_decrypt = 1;       // buffered, core idle
      key_valid = 1; key_in = k2;                      // new key at the same time
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!(key_valid && !key_ready)) begin
        failures++; $display("key not taken first");
      end else n_key_priority++;
      key_valid = 0;
      n_key_setup++; n_rekey++;
      exp_q.push_back(decrypt(k2, d));
      take_q.push_back(cycle);
      mode_q.push_back(2);      // starts after key setup: timing not checked
      n_decrypt++;
      drain();
    end

    checks++;
    if (n_results == 0 || exp_q.size() != 0) begin
      failures++; $display("results missing");
    end
    begin
      string names [7] = '{"key setup", "encrypt", "decrypt", "buffered while busy",
                           "mode switch", "rekey", "key priority"};
      int counts [7];
      counts = '{n_key_setup, n_encrypt, n_decrypt, n_buffered, n_mode_switch,
                 n_rekey, n_key_priority};
      for (int i = 0; i < 7; i++) begin
        $display("mechanism %-20s : %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++; $display("mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

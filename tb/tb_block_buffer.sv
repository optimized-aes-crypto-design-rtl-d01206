// tb_block_buffer - load, hold, clear and priority of load over clear for
// the 128-bit buffer with valid flag.
module tb_block_buffer;
  logic clk = 0, rst_n = 0;
  logic load, clear;
  logic [127:0] d, q;
  logic valid;
  int checks = 0, failures = 0;

  block_buffer dut (.clk(clk), .rst_n(rst_n), .load(load), .clear(clear),
                    .d(d), .q(q), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(logic v, logic [127:0] data, string what);
    checks++;
    if (valid !== v || (v && q !== data)) begin
      failures++; $display("%s: valid=%0b q=%h", what, valid, q);
    end
  endtask

  initial begin
    logic [127:0] held;
    load = 0; clear = 0; d = 0;
    #12 rst_n = 1;
    @(negedge clk); expect_state(0, 0, "after reset");
    for (int n = 0; n < 50; n++) begin
      held = {$urandom, $urandom, $urandom, $urandom};
      load = 1; d = held; clear = n[0];
      @(negedge clk); load = 0; clear = 0; d = ~held;
      expect_state(1, held, "after load");
      @(negedge clk); expect_state(1, held, "hold");
      clear = 1;
      @(negedge clk); clear = 0;
      expect_state(0, 0, "after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

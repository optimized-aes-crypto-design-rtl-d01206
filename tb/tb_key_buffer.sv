// tb_key_buffer - writes every entry of the 11 x 128 key buffer, rewrites
// some, and reads all back asynchronously against a shadow copy.
module tb_key_buffer;
  logic clk = 0;
  logic we;
  logic [3:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] shadow [11];
  int checks = 0, failures = 0;

  key_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                  .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [127:0] d);
    @(negedge clk); we = 1; waddr = 4'(a); wdata = d;
    @(negedge clk); we = 0;
    shadow[a] = d;
  endtask

  task automatic read_all();
    for (int a = 0; a < 11; a++) begin
      raddr = 4'(a); #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++; $display("key_buffer entry %0d: got %h expected %h", a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 11; a++) write(a, {$urandom, $urandom, $urandom, $urandom});
    read_all();
    for (int n = 0; n < 30; n++) write($urandom_range(10, 0), {$urandom, $urandom, $urandom, $urandom});
    // a cycle with we low must not write
    @(negedge clk); waddr = 4'd3; wdata = ~shadow[3];
    @(negedge clk);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

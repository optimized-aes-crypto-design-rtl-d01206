// tb_dse_decoder - exhaustive test of the three-stage DSE decoder: for each
// of the 256 input bytes exactly line[x] must be high.
module tb_dse_decoder;
  logic [7:0]   x;
  logic [255:0] line;
  int checks = 0, failures = 0;

  dse_decoder dut (.x(x), .line(line));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (line != (256'd1 << i)) begin
        failures++;
        $display("decoder x=%02h: wrong lines, popcount %0d", x, $countones(line));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

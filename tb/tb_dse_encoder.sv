// tb_dse_encoder - exhaustive test of the four-stage DSE encoder: a single
// high input I_v must give the byte v (v = 0 gives 0 since I_0x00 is unused).
module tb_dse_encoder;
  logic [255:0] enc_in;
  logic [7:0]   y;
  int checks = 0, failures = 0;

  dse_encoder dut (.enc_in(enc_in), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_in = '0;
    #1;
    checks++;
    if (y !== 8'h00) begin failures++; $display("encoder: idle output %02h", y); end
    for (int v = 0; v < 256; v++) begin
      enc_in = 256'd1 << v;
      #1;
      checks++;
      if (y != 8'(v)) begin
        failures++; $display("encoder: I_%02h gives %02h", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dse_switch - checks both wirings of the DSE switch: decoder line x must
// arrive at encoder input S(x) (forward) or S^-1(x) (inverse), with S taken
// from the reference model.
module tb_dse_switch;
  import aes_model_pkg::*;
  logic [255:0] line, fwd, inv;
  int checks = 0, failures = 0;

  dse_switch #(.INVERSE(1'b0)) dut_f (.line(line), .enc_in(fwd));
  dse_switch #(.INVERSE(1'b1)) dut_i (.line(line), .enc_in(inv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      line = 256'd1 << i;
      #1;
      checks += 2;
      if (fwd != (256'd1 << sbox(u8'(i)))) begin
        failures++; $display("forward switch: line %02h misrouted", i);
      end
      if (inv != (256'd1 << inv_sbox(u8'(i)))) begin
        failures++; $display("inverse switch: line %02h misrouted", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dse_sbox - exhaustive test of the DSE S-box: all 256 inputs through the
// forward and inverse paths of the encryption/decryption variant and through
// the forward-only variant, against the reference model; plus the FIPS-197
// examples S(0x53) = 0xed and S(0x00) = 0x63.
module tb_dse_sbox;
  import aes_model_pkg::*;
  logic [7:0] x, y_ed, y_f;
  logic       inv;
  int checks = 0, failures = 0;

  dse_sbox #(.ENC_DEC(1'b1)) dut_ed (.x(x), .inv(inv), .y(y_ed));
  dse_sbox #(.ENC_DEC(1'b0)) dut_f  (.x(x), .inv(1'b0), .y(y_f));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: x=%02h got %02h expected %02h", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'h53; inv = 1'b0; #1;
    check("fips S(53)", y_ed, 8'hed);
    x = 8'h00; #1;
    check("fips S(00)", y_f, 8'h63);
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      inv = 1'b0; #1;
      check("encdec forward", y_ed, sbox(x));
      check("forward-only", y_f, sbox(x));
      inv = 1'b1; #1;
      check("encdec inverse", y_ed, inv_sbox(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

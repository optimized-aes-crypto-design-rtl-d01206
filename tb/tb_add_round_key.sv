// tb_add_round_key - AddRoundKey on the FIPS-197 round-0 example and on
// random state/key pairs.
module tb_add_round_key;
  import aes_model_pkg::*;
  blk din, key, dout;
  int checks = 0, failures = 0;

  add_round_key dut (.din(din), .round_key(key), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++; $display("add_round_key FIPS example: got %h", dout);
    end
    for (int n = 0; n < 100; n++) begin
      din = rand_blk(); key = rand_blk(); #1;
      checks++;
      for (int i = 0; i < 128; i++)
        if (dout[i] != (din[i] != key[i])) begin
          failures++; $display("add_round_key bit %0d wrong", i); break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

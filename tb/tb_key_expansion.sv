// tb_key_expansion - the FIPS-197 Appendix A.1 key schedule (round keys 1
// and 10 printed there) and random key chains against the reference model.
module tb_key_expansion;
  import aes_model_pkg::*;
  blk prev, next;
  logic [3:0] round;
  int checks = 0, failures = 0;

  key_expansion dut (.prev_key(prev), .round(round), .next_key(next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      round = 4'(r); #1;
      if (r == 1) begin
        checks++;
        if (next !== 128'ha0fafe1788542cb123a339392a6c7605) begin
          failures++; $display("key_expansion FIPS round 1: got %h", next);
        end
      end
      if (r == 10) begin
        checks++;
        if (next !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
          failures++; $display("key_expansion FIPS round 10: got %h", next);
        end
      end
      prev = next;
    end
    for (int n = 0; n < 20; n++) begin
      prev = rand_blk();
      for (int r = 1; r <= 10; r++) begin
        blk exp;
        round = 4'(r); #1;
        exp = next_key(prev, r);
        checks++;
        if (next !== exp) begin
          failures++; $display("key_expansion round %0d: got %h expected %h", r, next, exp);
        end
        prev = next;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

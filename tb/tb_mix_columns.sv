// tb_mix_columns - MixColumns / InvMixColumns against the reference model,
// the FIPS-197 round-1 example, and the final-round bypass.
module tb_mix_columns;
  import aes_model_pkg::*;
  blk din, dout;
  logic inv, bypass;
  int checks = 0, failures = 0;

  mix_columns dut (.din(din), .inv(inv), .bypass(bypass), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; inv = 1'b0; bypass = 1'b0; #1;
    checks++;
    if (dout !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++; $display("mix_columns FIPS example: got %h", dout);
    end
    for (int n = 0; n < 300; n++) begin
      din = rand_blk(); inv = n[0]; bypass = (n % 5 == 0); #1;
      checks++;
      if (dout !== (bypass ? din : mix_columns(din, inv))) begin
        failures++;
        $display("mix_columns inv=%0b bypass=%0b din=%h got %h", inv, bypass, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

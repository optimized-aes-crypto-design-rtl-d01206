// tb_sub_bytes - random 128-bit states through SubBytes and InvSubBytes,
// compared with the reference model, plus a round trip.
module tb_sub_bytes;
  import aes_model_pkg::*;
  blk din, dout, back;
  logic inv;
  int checks = 0, failures = 0;

  sub_bytes dut  (.din(din),  .inv(inv),   .dout(dout));
  sub_bytes dut2 (.din(dout), .inv(~inv),  .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      din = rand_blk();
      inv = n[0];
      #1;
      checks += 2;
      if (dout !== sub_bytes(din, inv)) begin
        failures++; $display("sub_bytes inv=%0b din=%h got %h", inv, din, dout);
      end
      if (back !== din) begin
        failures++; $display("sub_bytes round trip failed for %h", din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_shift_rows - ShiftRows / InvShiftRows against the reference model and
// the FIPS-197 round-1 example (after SubBytes -> after ShiftRows).
module tb_shift_rows;
  import aes_model_pkg::*;
  blk din, dout;
  logic inv;
  int checks = 0, failures = 0;

  shift_rows dut (.din(din), .inv(inv), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'hd42711aee0bf98f1b8b45de51e415230; inv = 1'b0; #1;
    checks++;
    if (dout !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++; $display("shift_rows FIPS example: got %h", dout);
    end
    for (int n = 0; n < 200; n++) begin
      din = rand_blk(); inv = n[0]; #1;
      checks++;
      if (dout !== shift_rows(din, inv)) begin
        failures++; $display("shift_rows inv=%0b din=%h got %h", inv, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

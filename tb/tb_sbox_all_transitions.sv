// tb_sbox_all_transitions - the S-box workload of a switching-activity run:
// every one of the 256 x 256 input transitions (previous byte -> next byte)
// is applied to the encryption/decryption DSE S-box, in both directions.
// After every transition the output must equal the reference S-box value and
// exactly one decoder line must be high. The testbench also counts how many
// of the 256 switch outputs change per transition (2 when the byte changes,
// 0 when it does not): the one-hot core of the S-box toggles only two lines
// whatever the input change.
module tb_sbox_all_transitions;
  import aes_model_pkg::*;
  logic clk = 0;
  logic [7:0] x, y;
  logic inv;
  logic [255:0] prev_lines;
  int checks = 0, failures = 0;
  longint line_toggles = 0;
  u8 fwd_tab [256];
  u8 inv_tab [256];

  dse_sbox #(.ENC_DEC(1'b1)) dut (.x(x), .inv(inv), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      fwd_tab[i] = sbox(u8'(i));
      inv_tab[i] = inv_sbox(u8'(i));
    end
    for (int d = 0; d < 2; d++) begin
      inv = d[0];
      for (int a = 0; a < 256; a++) begin
        for (int b = 0; b < 256; b++) begin
          x = 8'(a);
          @(negedge clk);
          prev_lines = dut.line;
          x = 8'(b);
          @(negedge clk);
          checks++;
          if (y !== (inv ? inv_tab[b] : fwd_tab[b]) || $countones(dut.line) != 1) begin
            failures++;
            if (failures < 10) $display("transition %02h->%02h inv=%0b: y=%02h", a, b, inv, y);
          end
          line_toggles += $countones(prev_lines ^ dut.line);
          checks++;
          if ($countones(prev_lines ^ dut.line) != ((a == b) ? 0 : 2)) failures++;
        end
      end
    end
    $display("decoder line toggles over %0d transitions: %0d", 2 * 65536, line_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

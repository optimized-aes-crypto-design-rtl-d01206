// aes_core - iterative AES-128 encryption/decryption core built around the
// full-balanced DSE (decoder-switch-encoder) S-box.
//
// One hardware round serves both directions. The round chain is
//   state register -> SubBytes/InvSubBytes -> ShiftRows/InvShiftRows
//   -> MixColumns/InvMixColumns -> data MUX -> AddRoundKey -> state register
// with the data MUX selecting the input buffer in round 0 (initial key
// addition) and the round chain otherwise, and the final round bypassing
// MixColumns. Decryption runs the equivalent inverse cipher, which has the
// same order of steps, so only the inv controls change. The key MUX feeds
// AddRoundKey with
//   encryption: the initial key in round 0, then the key expansion unit's
//               on-the-fly output (one expansion step per round);
//   decryption: the key buffer entry of the round, filled during key setup
//               with the round keys in reverse order, rounds 1..9 passed
//               through InvMixColumns.
// The result of the final round goes to the output buffer.
//
// Interface (all synchronous to clk, asynchronous active-low rst_n):
//   key_valid/key_in/key_ready : key_in is taken when both valid and ready;
//       key setup then takes 10 cycles, after which key_loaded is 1.
//   in_valid/in_decrypt/in_data/in_ready : a block is taken into the input
//       buffer when in_valid and in_ready (buffer empty). The buffer can be
//       refilled while the previous block is processed.
//   out_valid/out_data : out_valid pulses for one cycle when out_data holds a
//       new result; out_data is held until the next result.
// Latency: 11 cycles of work per block (round 0 to 10); out_valid rises 11
// cycles after the block leaves the input buffer, 12 cycles after it is
// taken into an empty buffer while the core is idle.
// The block diagram (state register, the three transformation units, data
// MUX, AddRoundKey, key expansion, key buffer, key MUX, round counter, input
// and output buffers) follows the published architecture; the key-buffer
// contents, the handshakes and the cycle timing are this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_valid,
  input  aes_pkg::block_t key_in,
  output logic            key_ready,
  output logic            key_loaded,
  input  logic            in_valid,
  input  logic            in_decrypt,
  input  aes_pkg::block_t in_data,
  output logic            in_ready,
  output logic            out_valid,
  output aes_pkg::block_t out_data
);

  ctl_t   ctl;
  round_t round;

  block_t state_q;       // 128-bit state register
  block_t init_key_q;    // initial key register
  block_t kexp_q;        // on-the-fly key register (round key r-1)

  block_t sb_out, sr_out, mc_out;
  block_t data_mux, ark_out;
  block_t kexp_next, enc_key, kbuf_rdata, round_key;
  block_t kbuf_mix, kbuf_wdata;

  logic   inbuf_valid;
  logic   inbuf_dec;
  block_t inbuf_data;

  // ---------------------------------------------------------------- control
  aes_control u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .key_valid  (key_valid),
    .blk_pending(inbuf_valid),
    .blk_decrypt(inbuf_dec),
    .ctl        (ctl),
    .round      (round),
    .key_ready  (key_ready),
    .key_loaded (key_loaded)
  );

  // ----------------------------------------------------------- input buffer
  assign in_ready = !inbuf_valid;

  block_buffer #(.WIDTH(129)) u_inbuf (
    .clk  (clk),
    .rst_n(rst_n),
    .load (in_valid && in_ready),
    .clear(ctl.in_consume),
    .d    ({in_decrypt, in_data}),
    .q    ({inbuf_dec, inbuf_data}),
    .valid(inbuf_valid)
  );

  // -------------------------------------------------------------- datapath
  sub_bytes   u_sb (.din(state_q), .inv(ctl.decrypt), .dout(sb_out));
  shift_rows  u_sr (.din(sb_out),  .inv(ctl.decrypt), .dout(sr_out));
  mix_columns u_mc (.din(sr_out),  .inv(ctl.decrypt), .bypass(ctl.last_round),
                    .dout(mc_out));

  assign data_mux = ctl.sel_input ? inbuf_data : mc_out;

  add_round_key u_ark (.din(data_mux), .round_key(round_key), .dout(ark_out));

  always_ff @(posedge clk)
    if (ctl.state_load) state_q <= ark_out;

  // ------------------------------------------------------------- key path
  key_expansion u_kexp (.prev_key(kexp_q), .round(round), .next_key(kexp_next));

  always_ff @(posedge clk) begin
    if (ctl.key_accept) init_key_q <= key_in;
    if (ctl.key_init)   kexp_q     <= ctl.key_accept ? key_in : init_key_q;
    else if (ctl.key_step) kexp_q  <= kexp_next;
  end

  // Decryption keys of rounds 1..9 are stored through InvMixColumns.
  mix_columns u_kmc (.din(kexp_next), .inv(1'b1),
                     .bypass(round == round_t'(NR)), .dout(kbuf_mix));

  assign kbuf_wdata = ctl.kbuf_from_in ? key_in : kbuf_mix;

  key_buffer #(.DEPTH(NR + 1), .WIDTH(128)) u_kbuf (
    .clk  (clk),
    .we   (ctl.kbuf_we),
    .waddr(ctl.kbuf_waddr),
    .wdata(kbuf_wdata),
    .raddr(round),
    .rdata(kbuf_rdata)
  );

  assign enc_key   = ctl.sel_input ? init_key_q : kexp_next;
  assign round_key = ctl.decrypt ? kbuf_rdata : enc_key;

  // ---------------------------------------------------------- output buffer
  block_buffer #(.WIDTH(128)) u_outbuf (
    .clk  (clk),
    .rst_n(rst_n),
    .load (ctl.out_load),
    .clear(1'b1),
    .d    (ark_out),
    .q    (out_data),
    .valid(out_valid)
  );

  a_consume_pending: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.in_consume |-> inbuf_valid);

endmodule

// aes_control - round counter and sequencer of the iterative AES-128 core.
//
// Three states:
//   IDLE    If key_valid: take the key (key_accept), write it into key-buffer
//           entry NR (the last decryption round key) and go to KEYEXP.
//           Else, if a key is loaded and the input buffer holds a block:
//           take it and do round 0 (initial AddRoundKey; data MUX on the
//           input buffer), then go to CIPHER with round = 1.
//   KEYEXP  round = 1..NR: advance the key expansion by one step per cycle
//           and write key-buffer entry NR - round. After round NR the key
//           schedule is complete (key_loaded) and the sequencer is idle.
//   CIPHER  round = 1..NR: one full round per cycle; the round-NR (final)
//           round bypasses MixColumns and its result goes to the output
//           buffer.
// Timing: a block leaves the input buffer in the IDLE cycle and its result is
// written into the output buffer NR = 10 cycles later (11 cycles of work);
// key setup takes NR cycles after the accepting cycle. A key offered while
// idle has priority over a waiting block. Asynchronous active-low reset.
// One round per clock and this sequencing are the design's own choices; the
// round structure (initial key addition, Nr-1 rounds, final round) is AES.
module aes_control #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_valid,
  input  logic             blk_pending,
  input  logic             blk_decrypt,
  output aes_pkg::ctl_t    ctl,
  output aes_pkg::round_t  round,
  output logic             key_ready,
  output logic             key_loaded
);

  typedef enum logic [1:0] {ST_IDLE, ST_KEYEXP, ST_CIPHER} state_e;

  state_e state_q;
  logic   dec_q;

  assign key_ready = (state_q == ST_IDLE);

  always_comb begin
    ctl = '0;
    unique case (state_q)
      ST_IDLE: begin
        if (key_valid) begin
          ctl.key_accept   = 1'b1;
          ctl.key_init     = 1'b1;
          ctl.kbuf_we      = 1'b1;
          ctl.kbuf_waddr   = aes_pkg::round_t'(NR);
          ctl.kbuf_from_in = 1'b1;
        end else if (blk_pending && key_loaded) begin
          ctl.in_consume = 1'b1;
          ctl.state_load = 1'b1;
          ctl.sel_input  = 1'b1;
          ctl.decrypt    = blk_decrypt;
          ctl.key_init   = 1'b1;
        end
      end
      ST_KEYEXP: begin
        ctl.key_step   = 1'b1;
        ctl.kbuf_we    = 1'b1;
        ctl.kbuf_waddr = aes_pkg::round_t'(NR) - round;
      end
      ST_CIPHER: begin
        ctl.state_load = 1'b1;
        ctl.decrypt    = dec_q;
        ctl.key_step   = 1'b1;
        ctl.last_round = (round == aes_pkg::round_t'(NR));
        ctl.out_load   = (round == aes_pkg::round_t'(NR));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      round      <= '0;
      dec_q      <= 1'b0;
      key_loaded <= 1'b0;
    end else begin
      unique case (state_q)
        ST_IDLE: begin
          if (ctl.key_accept) begin
            state_q    <= ST_KEYEXP;
            round      <= 4'd1;
            key_loaded <= 1'b0;
          end else if (ctl.in_consume) begin
            state_q <= ST_CIPHER;
            round   <= 4'd1;
            dec_q   <= blk_decrypt;
          end
        end
        ST_KEYEXP, ST_CIPHER: begin
          if (round == aes_pkg::round_t'(NR)) begin
            state_q <= ST_IDLE;
            round   <= '0;
            if (state_q == ST_KEYEXP) key_loaded <= 1'b1;
          end else begin
            round <= round + 4'd1;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // The round counter never leaves 0..NR, and is 0 whenever idle.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    round <= aes_pkg::round_t'(NR));
  a_idle_round0: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == ST_IDLE |-> round == '0);

endmodule

// aes_encrypt: iterative AES-128 encryptor, one round per clock cycle, with
// round keys expanded on the fly (online key expansion).
//
// One round unit (aes_enc_round) and one key-expansion unit (aes_key_round)
// are reused for all ten rounds. In the cycle a block is accepted the
// initial AddRoundKey (pt ^ key) and round 1 are computed together, and the
// round-1 key is derived from the input key in the same cycle; rounds 2..10
// follow on the next nine edges from the state and round-key registers. The
// block therefore takes 10 clock cycles, and a new block can be accepted in
// the very cycle the previous ciphertext is shown, so the core sustains one
// 128-bit block every 10 cycles (128 bits x f / 10 in throughput).
//
// Interface: valid/ready on the input (key and pt are sampled when
// in_valid && in_ready), a one-cycle out_valid pulse with ct on the output,
// no back-pressure on the output. ct holds its value until the next block
// is accepted. Ten rounds and the valid/ready protocol follow AES-128 and
// the 10-cycle timing of the design; the handshake itself is this RTL's
// choice.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t key,
  input  block_t pt,
  output logic   out_valid,
  output block_t ct
);

  typedef enum logic {IDLE, RUN} fsm_t;

  fsm_t   fsm_q;
  logic [$clog2(NR+1)-1:0] rnd_q;   // rounds completed, valid in RUN
  logic [$clog2(NR+1)-1:0] rnd;     // round computed this cycle (1..NR)
  block_t state_q, key_q;
  block_t round_in, key_cur, round_key, round_out;
  byte_t  rc;
  logic   fire, last;

  assign in_ready = (fsm_q == IDLE);
  assign fire     = in_valid && in_ready;

  always_comb begin
    if (fsm_q == RUN) begin
      rnd      = rnd_q + 1'b1;
      round_in = state_q;
      key_cur  = key_q;
    end else begin
      rnd      = 1;
      round_in = pt ^ key;
      key_cur  = key;
    end
    rc   = rcon(int'(rnd));
    last = (rnd == NR[$bits(rnd)-1:0]);
  end

  aes_key_round u_key (.key_in(key_cur), .rc(rc), .key_out(round_key));
  aes_enc_round u_rnd (.state_in(round_in), .round_key(round_key), .last(last), .state_out(round_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm_q     <= IDLE;
      rnd_q     <= '0;
      out_valid <= 1'b0;
      state_q   <= '0;
      key_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (fire || fsm_q == RUN) begin
        state_q <= round_out;
        key_q   <= round_key;
        rnd_q   <= rnd;
        if (last) begin
          fsm_q     <= IDLE;
          out_valid <= 1'b1;
        end else begin
          fsm_q <= RUN;
        end
      end
    end
  end

  assign ct = state_q;

  // A result is only reported from a run, and never in two cycles in a row.
  a_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);

endmodule

// aes_decrypt: iterative AES-128 decryptor with offline key expansion.
//
// Key phase: when key_valid is seen (and no block is in flight) the ten
// round keys are expanded, one per cycle, and stored with the cipher key in
// the round-key memory (aes_key_ram, 11 x 128 bits, block-RAM style with a
// registered read). It takes 11 cycles (one store per key, k0..k10);
// key_ready then rises. The last
// round key k10 also stays in the expansion register, as it is the first key
// a decryption needs.
//
// Block phase: the straight inverse cipher, one round per cycle. In the
// accepting cycle the state is ct ^ k10 and round 1 (with k9) is computed at
// once, so a block takes 10 cycles, like the encryptor. The memory is read
// one cycle ahead: while idle it addresses k9, so k9 is on its output when a
// block arrives, and during a run the address walks down to k0, then back to
// k9 for the next block. Keys are thus computed once per key change rather
// than per block, and the key storage sits in memory, not in flip-flops.
//
// Interface: key_valid/key (one-cycle request; ignored while a block is in
// flight), key_ready; in_valid/in_ready/ct in; a one-cycle out_valid with pt
// out. in_ready is low until keys are ready and while a key is expanding.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_valid,
  input  block_t key,
  output logic   key_ready,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t ct,
  output logic   out_valid,
  output block_t pt
);

  localparam int unsigned CW = $clog2(NR+1);
  typedef logic [CW-1:0] cnt_t;

  typedef enum logic [1:0] {IDLE, KEXP, RUN} fsm_t;

  fsm_t   fsm_q;
  cnt_t   cnt_q;          // KEXP: next key index to store; RUN: rounds done
  logic   key_ready_q;
  block_t kreg_q;         // expansion register, holds k_NR when done
  block_t state_q;

  logic   key_fire, fire;
  block_t kexp_in, kexp_out;
  byte_t  rc;

  logic   we;
  cnt_t   waddr, raddr;
  block_t wdata, rk;

  block_t round_in, round_out;
  cnt_t   rnd;
  logic   last;

  assign key_fire  = key_valid && (fsm_q == IDLE);
  assign in_ready  = (fsm_q == IDLE) && key_ready_q && !key_valid;
  assign fire      = in_valid && in_ready;
  assign key_ready = key_ready_q;

  // ---- key expansion ----
  always_comb begin
    kexp_in = key_fire ? key : kreg_q;
    rc      = rcon(key_fire ? 1 : int'(cnt_q) + 1);
    we      = key_fire || (fsm_q == KEXP);
    waddr   = key_fire ? '0 : cnt_q;
    wdata   = key_fire ? key : kreg_q;
  end

  aes_key_round u_kexp (.key_in(kexp_in), .rc(rc), .key_out(kexp_out));

  // ---- round-key memory, read one cycle ahead ----
  always_comb begin
    if (fsm_q == RUN)
      raddr = (cnt_q == cnt_t'(NR-1)) ? cnt_t'(NR-1) : cnt_t'(NR-2) - cnt_q;
    else
      raddr = fire ? cnt_t'(NR-2) : cnt_t'(NR-1);
  end

  aes_key_ram #(.DEPTH(NR+1), .WIDTH(128)) u_ram (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rk));

  // ---- round datapath ----
  always_comb begin
    if (fsm_q == RUN) begin
      round_in = state_q;
      rnd      = cnt_q + 1'b1;
    end else begin
      round_in = ct ^ kreg_q;
      rnd      = cnt_t'(1);
    end
    last = (rnd == cnt_t'(NR));
  end

  aes_dec_round u_rnd (.state_in(round_in), .round_key(rk), .last(last), .state_out(round_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm_q       <= IDLE;
      cnt_q       <= '0;
      key_ready_q <= 1'b0;
      kreg_q      <= '0;
      state_q     <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (fsm_q)
        IDLE: begin
          if (key_fire) begin
            kreg_q      <= kexp_out;
            cnt_q       <= cnt_t'(1);
            key_ready_q <= 1'b0;
            fsm_q       <= KEXP;
          end else if (fire) begin
            state_q <= round_out;
            cnt_q   <= cnt_t'(1);
            fsm_q   <= RUN;
          end
        end
        KEXP: begin
          if (cnt_q == cnt_t'(NR)) begin
            key_ready_q <= 1'b1;
            fsm_q       <= IDLE;
          end else begin
            kreg_q <= kexp_out;
            cnt_q  <= cnt_q + 1'b1;
          end
        end
        RUN: begin
          state_q <= round_out;
          cnt_q   <= rnd;
          if (last) begin
            out_valid <= 1'b1;
            fsm_q     <= IDLE;
          end
        end
        default: fsm_q <= IDLE;
      endcase
    end
  end

  assign pt = state_q;

  a_pulse:    assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);
  a_no_start: assert property (@(posedge clk) disable iff (!rst_n) fire |-> key_ready_q);

endmodule

// aes_encrypt: iterative AES-128 encryption core, one round per clock.
//
// A block is encrypted as the standard prescribes: AddRoundKey with the
// cipher key, then nine rounds of SubBytes, ShiftRows, MixColumns and
// AddRoundKey, then a final round that leaves out MixColumns. One set of
// round logic is reused for all ten rounds. The round keys are not stored:
// a key register starts with the cipher key and is advanced by one key
// expansion step in each round, in the same cycle that uses the new key.
//
// Interface and timing:
//   start  - pulse while idle (busy low) to load plain and key; the
//            initial AddRoundKey is applied as the state is loaded.
//            A start while busy is ignored.
//   busy   - high during the 10 round cycles.
//   dstate - the round about to be computed (1..10) while busy, 0 when idle.
//   done   - one-cycle pulse 10 clocks after the start edge; cipher is
//            then valid and stays so until the next start.
// Throughput is therefore one 128-bit block per 11 clocks when start is
// raised again in the cycle after done.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plain,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] cipher,
  output logic [3:0]   dstate
);

  aes_block_t state_q, rkey_q;
  logic [3:0] round_q;

  aes_block_t load_state, rkey_next;
  aes_block_t sb, sr, mc, pre_ark, round_out;
  logic       last_round;

  // initial AddRoundKey, applied on load
  aes_add_round_key u_ark0 (.s_in(plain), .rkey(key), .s_out(load_state));

  // round key for the round being computed
  aes_key_expansion u_kexp (.key_in(rkey_q), .round(round_q), .key_out(rkey_next));

  // one round
  aes_sub_bytes     u_sb (.s_in(state_q), .s_out(sb));
  aes_shift_rows    u_sr (.s_in(sb),      .s_out(sr));
  aes_mix_columns   u_mc (.s_in(sr),      .s_out(mc));
  assign last_round = (round_q == 4'(AES_NR));
  assign pre_ark    = last_round ? sr : mc;
  aes_add_round_key u_ark (.s_in(pre_ark), .rkey(rkey_next), .s_out(round_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= load_state;
          rkey_q  <= key;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        rkey_q  <= rkey_next;
        if (last_round) begin
          round_q <= '0;
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  assign cipher = state_q;
  assign dstate = round_q;

  // the round counter never leaves 1..10 while a block is in flight
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (round_q >= 4'd1 && round_q <= 4'(AES_NR)));

endmodule

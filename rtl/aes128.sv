// aes128: iterative AES-128 encryption core, one round per clock cycle.
//
// The core encrypts msg under key. Its enable is level sensitive: while ce is
// low the core is idle; on the first clock edge with ce high it loads
// msg ^ key (the initial AddRoundKey) together with the cipher key, and on
// each of the next NR = 10 edges it applies one round (SubBytes, ShiftRows,
// MixColumns except in the last round, AddRoundKey) while expanding the next
// round key on the fly. After the tenth round last_round goes high and cipher
// holds the result for as long as ce stays high. Dropping ce returns the core
// to idle, ready for the next block.
//
// Timing: last_round rises 11 clock edges after ce is first seen high.
// msg and key must stay stable only during the first of those edges.
// rst is synchronous and active high and clears everything.
//
// The ports (ce, clk, key, msg, rst, cipher, last_round) and the chaining
// of cores by ce/last_round are those of the system this core was written
// for; the round-per-cycle structure, the timing and the computed S-box are
// this design's own choices.
module aes128
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  block_t       key,
  input  block_t       msg,
  output block_t       cipher,
  output logic         last_round
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;

  state_e      state;
  logic [3:0]  round;     // number of the round applied on the next edge
  byte_t       rcon;      // round constant of that round
  block_t      st, rk;
  block_t      nk, sr, nst;

  always_comb begin
    nk  = next_round_key(rk, rcon);
    sr  = shift_rows(sub_bytes(st));
    nst = ((round == 4'(NR)) ? sr : mix_columns(sr)) ^ nk;
  end

  always_ff @(posedge clk) begin
    if (rst || !ce) begin
      state <= IDLE;
      round <= '0;
      rcon  <= 8'h01;
      if (rst) begin
        st <= '0;
        rk <= '0;
      end
    end else begin
      unique case (state)
        IDLE: begin
          st    <= msg ^ key;
          rk    <= key;
          round <= 4'd1;
          rcon  <= 8'h01;
          state <= RUN;
        end
        RUN: begin
          st    <= nst;
          rk    <= nk;
          rcon  <= xtime(rcon);
          round <= round + 4'd1;
          if (round == 4'(NR)) state <= DONE;
        end
        DONE: ;
        default: state <= IDLE;
      endcase
    end
  end

  assign cipher     = st;
  assign last_round = (state == DONE);

endmodule

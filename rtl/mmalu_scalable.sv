// mmalu_scalable: bit-serial Montgomery modular ALU (MWR2MM with 1-bit words).
//
// Same operations, bounds and port list as mmalu (see there and ecc_pkg), but
// with a one-bit data path in the style of Tenca and Koc's multiple-word radix-2
// Montgomery multiplication. B and S are rotating registers of W = K+3 bits;
// each clock cycle one bit b_j, s_j and p_j is combined with a_i and q_i in a
// full-adder chain (the carry-save adders) whose 2-bit carry is kept in a
// register for the next bit. The sum bit is rotated back into S. After W
// cycles one extra "shift" cycle drops the zero LSB of S, puts the final carry
// in the MSB, shifts A by one bit and latches q_{i+1} = s_0 xor (a_0 and b_0)
// from the new LSBs, so q stays constant during the inner loop.
// Add and subtract use the same bit-serial adder: A shifts every cycle, B is
// inverted for a subtraction with a carry-in of 1, and S starts at 2p for a
// subtraction and at 0 for an addition.
//
// Interface: identical to mmalu. Timing: a product or scale takes
// (K+4)*(W+1) = (K+4)^2 cycles and an add or subtract W = K+3 cycles after
// the cycle that loads the operands (done follows en by (K+4)^2+1 and K+4
// cycles); done pulses once s holds the result. The word size (1 bit), the rotating B and S
// registers, the 2-bit carry, the q flip-flop and the 2p start value follow
// the document; the extra shift cycle per outer iteration, the carry-in of 1
// and the handshake are this design's own.
module mmalu_scalable #(
  parameter int unsigned K = 256,
  parameter logic [K-1:0] P = {{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         cmd,
  input  logic         sub,
  input  logic [K+1:0] a,
  input  logic [K+1:0] b,
  output logic [K+1:0] s,
  output logic         done
);

  localparam int unsigned N  = K + 4;       // outer iterations, R = 2^N
  localparam int unsigned W  = K + 3;       // bits of the intermediate result
  localparam int unsigned IW = $clog2(N + 1);
  localparam int unsigned JW = $clog2(W + 1);
  localparam logic [W-1:0] PW  = {3'b000, P};
  localparam logic [W-1:0] P2W = {2'b00, P, 1'b0};

  typedef enum logic [1:0] {IDLE, INNER, SHIFT, ADD} state_e;

  state_e          state;
  logic [K+1:0]    a_reg;
  logic [W-1:0]    b_reg, s_reg;
  logic [1:0]      c_reg;
  logic            q_reg;
  logic            sub_reg;
  logic [IW-1:0]   i_cnt;
  logic [JW-1:0]   j_cnt;

  logic [2:0]      bit_sum;
  logic            pj;

  always_comb begin
    pj = PW[j_cnt];
    if (state == ADD)
      bit_sum = {1'b0, c_reg} + {2'b00, a_reg[0]} + {2'b00, b_reg[0] ^ sub_reg}
              + {2'b00, s_reg[0]};
    else
      bit_sum = {1'b0, c_reg} + {2'b00, a_reg[0] & b_reg[0]} + {2'b00, s_reg[0]}
              + {2'b00, q_reg & pj};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      a_reg   <= '0;
      b_reg   <= '0;
      s_reg   <= '0;
      c_reg   <= '0;
      q_reg   <= 1'b0;
      sub_reg <= 1'b0;
      i_cnt   <= '0;
      j_cnt   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (en) begin
          logic [W-1:0] b_in;
          b_in    = (!cmd && sub) ? W'(1) : {1'b0, b};
          a_reg   <= a;
          b_reg   <= b_in;
          sub_reg <= sub;
          i_cnt   <= '0;
          j_cnt   <= '0;
          if (cmd) begin
            s_reg <= sub ? P2W : '0;
            c_reg <= {1'b0, sub};
            state <= ADD;
          end else begin
            s_reg <= '0;
            c_reg <= '0;
            q_reg <= a[0] & b_in[0];        // S = 0 at the start
            state <= INNER;
          end
        end
        INNER: begin
          s_reg <= {bit_sum[0], s_reg[W-1:1]};
          b_reg <= {b_reg[0], b_reg[W-1:1]};
          c_reg <= bit_sum[2:1];
          j_cnt <= j_cnt + 1'b1;
          if (j_cnt == JW'(W - 1)) state <= SHIFT;
        end
        SHIFT: begin
          s_reg <= {c_reg[0], s_reg[W-1:1]};
          a_reg <= a_reg >> 1;
          q_reg <= s_reg[1] ^ (a_reg[1] & b_reg[0]);
          c_reg <= '0;
          j_cnt <= '0;
          i_cnt <= i_cnt + 1'b1;
          if (i_cnt == IW'(N - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= INNER;
          end
        end
        ADD: begin
          s_reg <= {bit_sum[0], s_reg[W-1:1]};
          a_reg <= a_reg >> 1;
          b_reg <= {b_reg[0], b_reg[W-1:1]};
          c_reg <= bit_sum[2:1];
          j_cnt <= j_cnt + 1'b1;
          if (j_cnt == JW'(W - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign s = s_reg[K+1:0];

endmodule

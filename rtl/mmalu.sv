// mmalu: full-word Montgomery modular ALU (radix 2, no final subtraction).
//
// One datapath serves four operations, selected by {cmd, sub} (see ecc_pkg):
//   Montgomery product  S = A*B*R^-1 mod p, R = 2^(K+4) > 16p, A,B < 4p, S < 2p
//   scale               S = A*R^-1 mod p (B replaced by 1),   A < 4p,   S <= p
//   add                 S = A + B,                            A,B < 2p, S < 4p
//   subtract            S = A - B + 2p,                       A,B < 2p, S < 4p
// The multiplier is Walter's variant of Montgomery's algorithm: K+4 iterations,
// each adding a_i*B and q_i*p to S with two ripple-carry adders and shifting
// the sum right by one, where q_i = s_0 xor (a_i and b_0) (p is odd). The bound
// R > 16p keeps a product of two inputs < 4p below 2p, so no final subtraction
// is needed and the operation time does not depend on the data. For add and
// subtract the same two adders compute A + sub*2p and then + (B xor sub) with
// a carry-in of sub (two's complement), which keeps the result in [0, 4p).
// These bounds are the caller's responsibility; nothing here checks them.
//
// Interface: a one-cycle pulse on en (with cmd, sub, a, b valid) loads the A
// and B registers. A product or scale then takes K+4 clock cycles, an add or
// subtract one cycle; done pulses for one cycle once s holds the result, and s
// keeps it until the next en. en while busy is ignored.
// Timing: done follows en by K+5 cycles (multiply, scale) or 2 cycles (add,
// subtract). Register widths follow the document: A, B and s are K+2 bits,
// S is K+3 bits, the sum before the shift K+4 bits. The handshake (en/done
// pulses), the carry-in for subtraction and the reset are this design's own.
module mmalu #(
  parameter int unsigned K = 256,                 // bits of the prime p
  parameter logic [K-1:0] P = {{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F}  // secp256k1 prime
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // start pulse
  input  logic         cmd,     // 0: Montgomery multiply / scale, 1: add / subtract
  input  logic         sub,     // cmd=0: scale (B := 1); cmd=1: subtract
  input  logic [K+1:0] a,
  input  logic [K+1:0] b,
  output logic [K+1:0] s,
  output logic         done
);

  localparam int unsigned N  = K + 4;             // Montgomery iterations, R = 2^N
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {IDLE, MUL, ADD} state_e;

  state_e          state;
  logic [K+1:0]    a_reg;                         // shifts right, a_i = a_reg[0]
  logic [K+1:0]    b_reg;
  logic [K+2:0]    s_reg;                         // < 5p after the shift
  logic            sub_reg;
  logic [CW-1:0]   iter;

  logic            q_i;
  logic [K+3:0]    rca1, rca2;                    // < 10p before the shift
  logic [K+2:0]    add1, add2;

  // multiply datapath
  always_comb begin
    q_i  = s_reg[0] ^ (a_reg[0] & b_reg[0]);
    rca1 = {1'b0, s_reg} + (a_reg[0] ? {2'b00, b_reg} : '0);
    rca2 = rca1 + (q_i ? {4'b0000, P} : '0);
  end

  // add / subtract datapath
  always_comb begin
    add1 = {1'b0, a_reg} + (sub_reg ? {2'b00, P, 1'b0} : '0);
    add2 = add1 + ({1'b0, b_reg} ^ {(K+3){sub_reg}}) + {{(K+2){1'b0}}, sub_reg};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      a_reg   <= '0;
      b_reg   <= '0;
      s_reg   <= '0;
      sub_reg <= 1'b0;
      iter    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (en) begin
          a_reg   <= a;
          b_reg   <= (!cmd && sub) ? {{(K+1){1'b0}}, 1'b1} : b;
          sub_reg <= sub;
          s_reg   <= '0;
          iter    <= '0;
          state   <= cmd ? ADD : MUL;
        end
        MUL: begin
          s_reg <= rca2[K+3:1];
          a_reg <= a_reg >> 1;
          iter  <= iter + 1'b1;
          if (iter == CW'(N - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        ADD: begin
          s_reg <= add2;
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign s = s_reg[K+1:0];

  // q_i is chosen so that the sum is even: the bit dropped by the shift is 0
  assert property (@(posedge clk) (state == MUL) |-> !rca2[0]);

endmodule

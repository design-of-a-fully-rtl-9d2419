// point_mul: Montgomery-ladder scalar multiplication R = m*P.
//
// Every bit of the scalar costs exactly one point addition and one point
// doubling, both done by the same complete-formula point adder (a doubling is
// an addition of a point to itself), so the sequence of operations does not
// depend on the key. Since the complete formulas accept the point at
// infinity, the ladder starts from R0 = O = (0:1:0) and R1 = P and runs over
// all K bits of m, from the MSB down; the scalar needs no leading one.
// Per bit m_i:  R_(1-m_i) <- R0 + R1  and  R_(m_i) <- 2*R_(m_i).
//
// RANDOMIZE = 1: a random bit r_i chooses whether the addition or the doubling
// is done first. Both results go to temporaries T0/T1 and are copied to R0/R1
// at the end of the step (one cycle), so either order is correct.
// RANDOMIZE = 0: the addition is always done first and its result is written
// straight back; no temporaries are needed.
//
// Interface: start (one-cycle pulse while idle) latches m, rnd and the base
// point pt_in (coordinates below 2p; any projective representation, e.g.
// (x:y:1)). done pulses when pt_out holds R0 = m*P in projective coordinates
// (coordinates <= p, result not normalised: x = X/Z, y = Y/Z). rnd supplies
// the random bits r_i, bit i used for scalar bit i.
// Timing: each point operation takes one load cycle, the point addition and
// one store cycle; with RANDOMIZE one more copy cycle per bit.
// The ladder, the O/P start and the random order follow the document; the
// rnd port (the document does not say where r_i comes from), the copy cycle
// and the handshake are this design's own.
module point_mul #(
  parameter int unsigned K = 256,
  parameter logic [K-1:0] P = {{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F},
  parameter logic [K+1:0] B3 = (K+2)'(44'h150_0005_0250),
  parameter bit SCALABLE = 1'b0,
  parameter bit RANDOMIZE = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [K-1:0]       m,
  input  logic [K-1:0]       rnd,
  input  logic [2:0][K+1:0]  pt_in,
  output logic [2:0][K+1:0]  pt_out,
  output logic               busy,
  output logic               done
);

  typedef enum logic [2:0] {IDLE, LAUNCH, RUN, COPY} state_e;

  localparam int unsigned BW = $clog2(K);

  state_e              state;
  logic [K-1:0]        m_reg, r_reg;
  logic [BW-1:0]       bit_idx;
  logic                second;       // 0: first point operation of the bit, 1: second
  logic [2:0][K+1:0]   r0, r1, t0, t1;

  logic                m_i, r_i, do_add;
  logic [2:0][K+1:0]   op1, op2, pa_out;
  logic                pa_load, pa_start, pa_busy, pa_done;

  assign m_i = m_reg[bit_idx];
  assign r_i = RANDOMIZE ? r_reg[bit_idx] : 1'b0;
  // r_i = 0: addition first, r_i = 1: doubling first
  assign do_add = (second == r_i);

  always_comb begin
    if (do_add) begin
      op1 = r0;
      op2 = r1;
    end else begin
      op1 = m_i ? r1 : r0;
      op2 = op1;
    end
  end

  assign pa_load  = (state == LAUNCH);
  assign pa_start = (state == LAUNCH);

  point_adder #(.K(K), .P(P), .B3(B3), .SCALABLE(SCALABLE)) u_pa (
    .clk, .rst_n, .load(pa_load), .pt1_in(op1), .pt2_in(op2),
    .start(pa_start), .pt3_out(pa_out), .busy(pa_busy), .done(pa_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      m_reg   <= '0;
      r_reg   <= '0;
      bit_idx <= '0;
      second  <= 1'b0;
      r0      <= '0;
      r1      <= '0;
      t0      <= '0;
      t1      <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          m_reg   <= m;
          r_reg   <= rnd;
          bit_idx <= BW'(K - 1);
          second  <= 1'b0;
          r0      <= {(K+2)'(0), (K+2)'(1), (K+2)'(0)};   // O = (0:1:0), {Z,Y,X}
          r1      <= pt_in;
          state   <= LAUNCH;
        end
        LAUNCH: state <= RUN;
        RUN: if (pa_done) begin
          if (RANDOMIZE) begin
            // addition -> T_(1-m_i), doubling -> T_(m_i)
            if (do_add ^ m_i) t1 <= pa_out;
            else              t0 <= pa_out;
          end else begin
            if (do_add ^ m_i) r1 <= pa_out;
            else              r0 <= pa_out;
          end
          if (!second) begin
            second <= 1'b1;
            state  <= LAUNCH;
          end else begin
            second <= 1'b0;
            state  <= RANDOMIZE ? COPY : LAUNCH;
            if (!RANDOMIZE) begin
              if (bit_idx == '0) begin
                state <= IDLE;
                done  <= 1'b1;
              end else begin
                bit_idx <= bit_idx - 1'b1;
              end
            end
          end
        end
        COPY: begin
          r0 <= t0;
          r1 <= t1;
          if (bit_idx == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= LAUNCH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign pt_out = r0;
  assign busy   = (state != IDLE);

  // the point adder is busy for the whole RUN state, until its done pulse
  assert property (@(posedge clk) (state == RUN) |-> (pa_busy || pa_done));

endmodule

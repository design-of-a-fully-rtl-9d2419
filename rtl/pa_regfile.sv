// pa_regfile: register file of the point adder.
//
// Eleven K+2-bit registers: the six input coordinates X1 Y1 Z1 X2 Y2 Z2 and the
// temporaries t0..t4. X1, Y1 and Z1 double as the output point. The MMALU's
// left operand (LO) and right operand (RO) are each chosen by a 3-bit address
// from eight sources, and the write address (WA) reaches eight registers
// (address maps in ecc_pkg). t0 is not writable: every write to t1 moves the
// old t1 into t0, so t0/t1 form a two-stage shift register. X2 and Z2 are only
// written by load. The right port's eighth source is the curve constant
// B3 = 3b*R mod p (b in the Montgomery domain), a parameter, not a register.
//
// Interface: load (one cycle) copies both input points into X1..Z2; we writes
// din to the register at wa on the clock edge. Reads are combinational.
// The register count, the 3-bit addresses, the t1->t0 shift and the point
// ports follow the document; the address map and the clearing of the
// temporaries on reset and load are this design's own.
module pa_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned K = 256,
  parameter logic [K+1:0] B3 = (K+2)'(44'h150_0005_0250)  // 21*2^260 mod p (secp256k1, b = 7)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [2:0][K+1:0]  pt1_in,    // {Z1, Y1, X1}
  input  logic [2:0][K+1:0]  pt2_in,    // {Z2, Y2, X2}
  input  lo_addr_e           lo,
  input  ro_addr_e           ro,
  input  logic               we,
  input  wr_addr_e           wa,
  input  logic [K+1:0]       din,
  output logic [K+1:0]       lo_data,
  output logic [K+1:0]       ro_data,
  output logic [2:0][K+1:0]  pt3_out    // {Z1, Y1, X1} after the addition
);

  logic [K+1:0] x1, y1, z1, x2, y2, z2;
  logic [K+1:0] t0, t1, t2, t3, t4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x1, y1, z1, x2, y2, z2} <= '0;
      {t0, t1, t2, t3, t4}     <= '0;
    end else if (load) begin
      x1 <= pt1_in[0]; y1 <= pt1_in[1]; z1 <= pt1_in[2];
      x2 <= pt2_in[0]; y2 <= pt2_in[1]; z2 <= pt2_in[2];
      {t0, t1, t2, t3, t4} <= '0;
    end else if (we) begin
      unique case (wa)
        W_X1: x1 <= din;
        W_Y1: y1 <= din;
        W_Z1: z1 <= din;
        W_Y2: y2 <= din;
        W_T1: begin t1 <= din; t0 <= t1; end
        W_T2: t2 <= din;
        W_T3: t3 <= din;
        W_T4: t4 <= din;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (lo)
      L_X1: lo_data = x1;
      L_Y1: lo_data = y1;
      L_Z1: lo_data = z1;
      L_X2: lo_data = x2;
      L_Y2: lo_data = y2;
      L_T0: lo_data = t0;
      L_T2: lo_data = t2;
      L_T3: lo_data = t3;
      default: lo_data = '0;
    endcase
    unique case (ro)
      R_X1: ro_data = x1;
      R_Y1: ro_data = y1;
      R_Y2: ro_data = y2;
      R_Z2: ro_data = z2;
      R_T0: ro_data = t0;
      R_T1: ro_data = t1;
      R_T4: ro_data = t4;
      R_B3: ro_data = B3;
      default: ro_data = '0;
    endcase
  end

  assign pt3_out = {z1, y1, x1};

endmodule

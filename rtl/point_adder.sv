// point_adder: complete projective point addition on y^2 = x^3 + b (a = 0).
//
// Computes (X3:Y3:Z3) = (X1:Y1:Z1) + (X2:Y2:Z2) with the complete formulas of
// Renes, Costello and Batina for j-invariant-0 short Weierstrass curves. The
// same formulas serve addition, doubling (equal inputs) and the point at
// infinity (0:1:0), so there are no special cases and every call executes
// the same 36 MMALU operations: 14 Montgomery products, 19 additions or
// subtractions and 3 final scalings by R^-1 that bring each output
// coordinate below p+1 so that it is a valid input to the next addition.
// Because the formulas are homogeneous, inputs need no conversion into the
// Montgomery domain: the result differs from the true sum only by a common
// factor of the coordinates. Only the constant B3 = 3b*R mod p must be in the
// Montgomery domain.
//
// Structure: pa_regfile (11 registers) -> MMALU (left and right operand) ->
// back into the register file, sequenced by pa_fsm. The MMALU is the
// full-word mmalu by default or mmalu_scalable when SCALABLE = 1.
//
// Interface: load (one cycle, idle) latches both input points; start (one
// cycle, idle) runs the addition; done pulses when pt3_out holds the result,
// which stays valid until the next load. Inputs must be below 2p per
// coordinate for the operand bounds to hold (outputs are at most p).
// Timing (full-word MMALU): 17*(K+6) + 19*3 + 1 cycles from the start pulse
// to done (4512 for K = 256).
// The structure and the schedule follow the document; SCALABLE as a parameter
// and the load/start handshake are this design's own.
module point_adder
  import ecc_pkg::*;
#(
  parameter int unsigned K = 256,
  parameter logic [K-1:0] P = {{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F},
  parameter logic [K+1:0] B3 = (K+2)'(44'h150_0005_0250),
  parameter bit SCALABLE = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [2:0][K+1:0]  pt1_in,
  input  logic [2:0][K+1:0]  pt2_in,
  input  logic               start,
  output logic [2:0][K+1:0]  pt3_out,
  output logic               busy,
  output logic               done
);

  logic         alu_en, alu_cmd, alu_sub, alu_done;
  logic [K+1:0] lo_data, ro_data, alu_s;
  lo_addr_e     lo;
  ro_addr_e     ro;
  wr_addr_e     wa;
  logic         we;

  pa_regfile #(.K(K), .B3(B3)) u_rf (
    .clk, .rst_n, .load, .pt1_in, .pt2_in,
    .lo, .ro, .we, .wa, .din(alu_s),
    .lo_data, .ro_data, .pt3_out
  );

  pa_fsm u_fsm (
    .clk, .rst_n, .start, .alu_done,
    .alu_en, .alu_cmd, .alu_sub, .lo, .ro, .we, .wa, .busy, .done
  );

  if (SCALABLE) begin : g_alu
    mmalu_scalable #(.K(K), .P(P)) u_alu (
      .clk, .rst_n, .en(alu_en), .cmd(alu_cmd), .sub(alu_sub),
      .a(lo_data), .b(ro_data), .s(alu_s), .done(alu_done)
    );
  end else begin : g_alu
    mmalu #(.K(K), .P(P)) u_alu (
      .clk, .rst_n, .en(alu_en), .cmd(alu_cmd), .sub(alu_sub),
      .a(lo_data), .b(ro_data), .s(alu_s), .done(alu_done)
    );
  end

  // load and start are only meaningful while no addition is running
  assert property (@(posedge clk) (load || start) |-> !busy);

endmodule

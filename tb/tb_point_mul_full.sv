// tb_point_mul_full: one full-size scalar multiplication on secp256k1.
//
// point_mul at its default parameters (K = 256, secp256k1, full-word MMALU,
// randomized ladder) computes m*G for the standard base point G and a fixed
// 256-bit scalar with random order bits. The projective result is converted
// to affine coordinates in the testbench and compared with a known answer
// computed independently with affine arithmetic; it is also checked against
// a double-and-add reference, for the on-curve property and for the output
// bound. The cycle count must equal 256*(2*(PA+1)+1)+1 with
// PA = 17*(K+6) + 19*3 + 1 the point-addition latency.
`timescale 1ns/1ps
module tb_point_mul_full;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 256;
  localparam big_t PP = big_t'({{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F});
  localparam big_t BB = 7;
  localparam int unsigned PA_LAT = 17 * (K + 6) + 19 * 3 + 1;
  localparam int unsigned PM_LAT = K * (2 * (PA_LAT + 1) + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [K-1:0] m = '0, rnd = '0;
  logic [2:0][K+1:0] pt_in = '0, pt_out;
  logic busy, done;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  point_mul dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : main
    rpoint_t g, r, exp_r;
    int unsigned t0;
    g.x = 544'h79BE667EF9DCBBAC55A06295CE870B07029BFCDB2DCE28D959F2815B16F81798;
    g.y = 544'h483ADA7726A3C4655DA4FBFC0E1108A8FD17B448A68554199C47D08FFB10D4B8;
    g.z = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    m = 256'hC0FFEE0123456789ABCDEF0011223344556677889900AABBCCDDEEFF13572468;
    rnd = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    pt_in = {(K+2)'(g.z), (K+2)'(g.y), (K+2)'(g.x)};
    start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    r.x = big_t'(pt_out[0]); r.y = big_t'(pt_out[1]); r.z = big_t'(pt_out[2]);
    check("known answer x", affine_x(r, PP) ==
          544'hFA4CD15D7D9062E12AB5B4DD39A22ABF02588EB8F402A518734549B7450D84BE);
    check("known answer y", affine_y(r, PP) ==
          544'hEF25FE2C9C1632A21734034ABE1610DE1EC21451757C53DC133BB8DD7764DE3B);
    exp_r = pmul(big_t'(m), K, g, 3 * BB, PP);
    check("equals reference", peq(r, exp_r, PP));
    check("on curve", on_curve(r, BB, PP));
    check("coordinates <= p", r.x <= PP && r.y <= PP && r.z <= PP);
    check("cycle count", cyc - t0 == PM_LAT);
    $display("cycles for one 256-bit scalar multiplication: %0d (expected %0d)", cyc - t0, PM_LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (PM_LAT + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

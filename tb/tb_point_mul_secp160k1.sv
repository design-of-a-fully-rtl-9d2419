// tb_point_mul_secp160k1: one scalar multiplication on secp160k1, with the
// full-word and with the bit-serial Montgomery ALU.
//
// Two builds of point_mul for a 160-bit prime (K = 160, P and B3 of
// secp160k1, randomized ladder), one with the full-word MMALU and one with the
// bit-serial one, compute m*G for the standard base point G and a fixed
// 160-bit scalar with the same random order bits. Each projective result is
// converted to affine coordinates in the testbench and compared with a known
// answer computed independently with affine arithmetic; it is also checked
// against a double-and-add reference, for the on-curve property and for the
// output bound. The cycle counts must equal 160*(2*(PA+1)+1)+1 with the
// point-addition latency PA = 17*(K+6) + 19*3 + 1 (full-word) or
// PA = 17*((K+4)^2+2) + 19*(K+5) + 1 (bit-serial): 922,081 and 147,329,121
// cycles. The bit-serial run takes about a minute of simulation.
`timescale 1ns/1ps
module tb_point_mul_secp160k1;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 160;
  localparam big_t PP = big_t'({{(K-33){1'b1}}, 1'b0, 32'hFFFF_AC73});
  localparam logic [K+1:0] B3 = (K+2)'(44'h150_006D_A910);   // 21*2^164 mod p
  localparam big_t BB = 7;
  localparam int unsigned PA_LAT = 17 * (K + 6) + 19 * 3 + 1;
  localparam int unsigned PM_LAT = K * (2 * (PA_LAT + 1) + 1) + 1;
  localparam int unsigned PA_LAT_BS = 17 * ((K + 4) * (K + 4) + 2) + 19 * (K + 5) + 1;
  localparam int unsigned PM_LAT_BS = K * (2 * (PA_LAT_BS + 1) + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [K-1:0] m = '0, rnd = '0;
  logic [2:0][K+1:0] pt_in = '0, out_fw, out_bs;
  logic busy_fw, done_fw, busy_bs, done_bs;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  point_mul #(.K(K), .P(PP[K-1:0]), .B3(B3)) dut_fw (
    .clk, .rst_n, .start, .m, .rnd, .pt_in, .pt_out(out_fw), .busy(busy_fw), .done(done_fw));
  point_mul #(.K(K), .P(PP[K-1:0]), .B3(B3), .SCALABLE(1'b1)) dut_bs (
    .clk, .rst_n, .start, .m, .rnd, .pt_in, .pt_out(out_bs), .busy(busy_bs), .done(done_bs));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_result(string tag, logic [2:0][K+1:0] o, rpoint_t exp_r);
    rpoint_t r;
    r.x = big_t'(o[0]); r.y = big_t'(o[1]); r.z = big_t'(o[2]);
    check({tag, ": known answer x"}, affine_x(r, PP) ==
          544'hAEC7D07FFEE78F7580A4A8AA9B0DBEB1D5DAC483);
    check({tag, ": known answer y"}, affine_y(r, PP) ==
          544'h6B21B2572B0EFE43BEF647E50CB6D90D530B3290);
    check({tag, ": equals reference"}, peq(r, exp_r, PP));
    check({tag, ": on curve"}, on_curve(r, BB, PP));
    check({tag, ": coordinates <= p"}, r.x <= PP && r.y <= PP && r.z <= PP);
  endtask

  initial begin : main
    rpoint_t g, exp_r;
    int unsigned t0, lat_fw, lat_bs;
    g.x = 544'h3B4C382CE37AA192A4019E763036F4F5DD4D7EBB;
    g.y = 544'h938CF935318FDCED6BC28286531733C3F03C4FEE;
    g.z = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    m = 160'h7A3F00C1D2E3F405162738495A6B7C8D9EAFB0C1;
    rnd = {$urandom, $urandom, $urandom, $urandom, $urandom};
    pt_in = {(K+2)'(g.z), (K+2)'(g.y), (K+2)'(g.x)};
    start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 1'b0;
    exp_r = pmul(big_t'(m), K, g, 3 * BB, PP);
    while (!done_fw) @(negedge clk);
    lat_fw = cyc - t0;
    check_result("full-word", out_fw, exp_r);
    check("full-word: cycle count", lat_fw == PM_LAT);
    $display("full-word: %0d cycles (expected %0d)", lat_fw, PM_LAT);
    check("bit-serial build still busy", busy_bs && !busy_fw);
    while (!done_bs) @(negedge clk);
    lat_bs = cyc - t0;
    check_result("bit-serial", out_bs, exp_r);
    check("bit-serial: cycle count", lat_bs == PM_LAT_BS);
    $display("bit-serial: %0d cycles (expected %0d)", lat_bs, PM_LAT_BS);
    @(negedge clk);
    check("both builds idle", !busy_fw && !busy_bs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (PM_LAT_BS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

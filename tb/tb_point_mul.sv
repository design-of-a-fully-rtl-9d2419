// tb_point_mul: end-to-end testbench of the coprocessor (point_mul).
//
// Runs scalar multiplications on a 32-bit test curve y^2 = x^3 + 7 over
// p = 2^32 - 153 (no point of order 2, so the complete formulas apply) with
// three builds of the design side by side: full-word MMALU with randomized
// ladder order, full-word without randomization, and the bit-serial MMALU
// with randomization. Every result is checked against a double-and-add
// reference in plain modular arithmetic (projective equality, on-curve test,
// coordinates <= p), and a fixed case against a known answer. Scalars include
// 0, 1, 2, all ones, a single top bit and random values; random order bits
// are random.
// Counted mechanisms, each of which must occur: all four (m_i, r_i) branches
// of the randomized ladder, additions involving the point at infinity, the
// copy of the temporaries, and results equal to O. The cycle count of a scalar
// multiplication must be the same for every scalar and random input
// (constant-time ladder) and must equal the expected formula.
`timescale 1ns/1ps
module tb_point_mul;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 32;
  localparam logic [K-1:0] P = 32'hFFFF_FF67;
  localparam logic [K+1:0] B3 = 34'h0_0000_C8D0;      // 3*7*2^36 mod p
  localparam big_t PP = big_t'(P);
  localparam big_t BB = 7;
  localparam int unsigned NTEST = 12;
  // cycles of one point addition (full-word), see point_adder
  localparam int unsigned PA_LAT = 17 * (K + 6) + 19 * 3 + 1;
  localparam int unsigned PM_LAT_FW = K * (2 * (PA_LAT + 1) + 1) + 1;
  localparam int unsigned PM_LAT_FW_NR = K * 2 * (PA_LAT + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [K-1:0] m = '0, rnd = '0;
  logic [2:0][K+1:0] pt_in = '0;
  logic [2:0][K+1:0] out_a, out_b, out_c;
  logic busy_a, busy_b, busy_c, done_a, done_b, done_c;
  logic seen_a, seen_b, seen_c;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned lat_a, lat_b, lat_c, lat_c_first;
  int branch_cnt[4] = '{default: 0};
  int inf_cnt = 0, copy_cnt = 0, zero_res = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  point_mul #(.K(K), .P(P), .B3(B3), .SCALABLE(1'b0), .RANDOMIZE(1'b1)) dut_a (
    .clk, .rst_n, .start, .m, .rnd, .pt_in, .pt_out(out_a), .busy(busy_a), .done(done_a));
  point_mul #(.K(K), .P(P), .B3(B3), .SCALABLE(1'b0), .RANDOMIZE(1'b0)) dut_b (
    .clk, .rst_n, .start, .m, .rnd, .pt_in, .pt_out(out_b), .busy(busy_b), .done(done_b));
  point_mul #(.K(K), .P(P), .B3(B3), .SCALABLE(1'b1), .RANDOMIZE(1'b1)) dut_c (
    .clk, .rst_n, .start, .m, .rnd, .pt_in, .pt_out(out_c), .busy(busy_c), .done(done_c));

  // mechanism counters on the randomized full-word build
  always @(posedge clk) begin
    if (dut_a.pa_start && !dut_a.second)
      branch_cnt[{dut_a.m_i, dut_a.r_i}]++;
    if (dut_a.pa_start &&
        (dut_a.op1[2] == '0 || dut_a.op2[2] == '0))
      inf_cnt++;
    if (32'(dut_a.state) == 3) copy_cnt++;   // COPY state
  end

  function automatic rpoint_t from_hw(logic [2:0][K+1:0] h);
    rpoint_t r;
    r.x = big_t'(h[0]); r.y = big_t'(h[1]); r.z = big_t'(h[2]);
    return r;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (m=%h rnd=%h)", what, m, rnd);
    end
  endtask

  task automatic check_result(string tag, logic [2:0][K+1:0] o, rpoint_t exp_r);
    rpoint_t r;
    r = from_hw(o);
    check({tag, ": equals reference"}, peq(r, exp_r, PP));
    check({tag, ": on curve"}, on_curve(r, BB, PP));
    check({tag, ": coordinates <= p"}, r.x <= PP && r.y <= PP && r.z <= PP);
  endtask

  task automatic run(input logic [K-1:0] mv, input logic [K-1:0] rv, input rpoint_t g);
    int unsigned t0;
    rpoint_t exp_r;
    @(negedge clk);
    m = mv; rnd = rv;
    pt_in = {(K+2)'(g.z), (K+2)'(g.y), (K+2)'(g.x)};
    start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 1'b0;
    seen_a = 0; seen_b = 0; seen_c = 0;
    while (!(seen_a && seen_b && seen_c)) begin
      if (done_a && !seen_a) begin seen_a = 1; lat_a = cyc - t0; end
      if (done_b && !seen_b) begin seen_b = 1; lat_b = cyc - t0; end
      if (done_c && !seen_c) begin seen_c = 1; lat_c = cyc - t0; end
      @(negedge clk);
    end
    exp_r = pmul(big_t'(mv), K, g, 3 * BB, PP);
    if (exp_r.z % PP == 0) zero_res++;
    check_result("randomized", out_a, exp_r);
    check_result("plain ladder", out_b, exp_r);
    check_result("bit-serial", out_c, exp_r);
    check("latency randomized", lat_a == PM_LAT_FW);
    check("latency plain ladder", lat_b == PM_LAT_FW_NR);
    if (lat_c_first == 0) lat_c_first = lat_c;
    check("latency bit-serial constant", lat_c == lat_c_first);
    if (lat_a != PM_LAT_FW || lat_b != PM_LAT_FW_NR)
      $display("  latencies %0d %0d, expected %0d %0d", lat_a, lat_b, PM_LAT_FW, PM_LAT_FW_NR);
  endtask

  initial begin : main
    rpoint_t g, g2;
    lat_c_first = 0;
    g.x = 2; g.y = 544'h65FADCD7; g.z = 1;
    // a second representation of G with Z != 1
    g2.x = mulm(g.x, 12345, PP); g2.y = mulm(g.y, 12345, PP); g2.z = 12345;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run(32'hDEAD_BEEF, 32'h1234_5678, g);
    // known answer, affine
    begin
      rpoint_t r;
      r = from_hw(out_a);
      check("known answer x", affine_x(r, PP) == 544'h1C31AE72);
      check("known answer y", affine_y(r, PP) == 544'h90E2AE39);
    end
    run('0, 32'hFFFF_FFFF, g);
    run(32'd1, '0, g2);
    run(32'd2, 32'h5555_5555, g);
    run('1, 32'hA5A5_A5A5, g2);
    run(32'h8000_0000, 32'h0F0F_0F0F, g);
    for (int n = 0; n < NTEST; n++)
      run($urandom, $urandom, (n % 2 == 1) ? g : g2);

    check("branch m=0 r=0 seen", branch_cnt[0] > 0);
    check("branch m=0 r=1 seen", branch_cnt[1] > 0);
    check("branch m=1 r=0 seen", branch_cnt[2] > 0);
    check("branch m=1 r=1 seen", branch_cnt[3] > 0);
    check("operation with O seen", inf_cnt > 0);
    check("copy of temporaries seen", copy_cnt > 0);
    check("result O seen", zero_res > 0);
    $display("mechanisms: branches %0d %0d %0d %0d, with O %0d, copies %0d, O results %0d",
             branch_cnt[0], branch_cnt[1], branch_cnt[2], branch_cnt[3], inf_cnt, copy_cnt, zero_res);
    $display("cycles per scalar multiplication: randomized %0d, plain %0d, bit-serial %0d",
             lat_a, lat_b, lat_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30 * 2 * K * 40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_point_adder: self-checking testbench of point_adder on secp256k1.
//
// Uses the adder's default parameters (K = 256, secp256k1 prime, b = 7).
// Points are generated from the standard base point G by repeated addition in
// the reference model, then given random projective representations
// (lambda*x : lambda*y : lambda) before they are loaded. Cases: O+G, G+O,
// G+G (doubling), G+(-G) = O, O+O, random sums, doublings of one point in two
// different representations, and chains that feed the adder's own output
// back as an input, as the ladder does. Each result must equal the reference
// sum as a projective point, lie on the curve, and have every coordinate
// <= p. The start-to-done latency must be 17*(K+6) + 19*3 + 1 cycles for
// every call, whatever the data.
`timescale 1ns/1ps
module tb_point_adder;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 256;
  localparam big_t PP = big_t'({{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F});
  localparam big_t BB = 7;
  localparam int unsigned NTEST = 40;
  localparam int unsigned LAT = 17 * (K + 6) + 19 * 3 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0;
  logic [2:0][K+1:0] pt1_in = '0, pt2_in = '0, pt3_out;
  logic busy, done;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  point_adder dut (.*);

  rpoint_t pts[8];
  rpoint_t last_out;

  function automatic big_t rnd_below(big_t lim);
    big_t r = '0;
    for (int i = 0; i < 17; i++) r = {r[511:0], 32'($urandom)};
    return r % lim;
  endfunction

  function automatic rpoint_t rerep(rpoint_t a);
    big_t l;
    rpoint_t r;
    l = rnd_below(PP - 1) + 1;
    r.x = mulm(a.x, l, PP); r.y = mulm(a.y, l, PP); r.z = mulm(a.z, l, PP);
    return r;
  endfunction

  function automatic logic [2:0][K+1:0] to_hw(rpoint_t a);
    return {(K+2)'(a.z), (K+2)'(a.y), (K+2)'(a.x)};
  endfunction

  function automatic rpoint_t from_hw(logic [2:0][K+1:0] h);
    rpoint_t r;
    r.x = big_t'(h[0]); r.y = big_t'(h[1]); r.z = big_t'(h[2]);
    return r;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_add(input rpoint_t a, input rpoint_t b, input string what);
    int unsigned t0;
    rpoint_t res, ref_r;
    @(negedge clk);
    pt1_in = to_hw(a); pt2_in = to_hw(b); load = 1'b1; start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); load = 1'b0; start = 1'b0;
    while (!done) @(negedge clk);
    res = from_hw(pt3_out);
    ref_r = padd(a, b, 3 * BB, PP);
    check({what, ": equals reference"}, peq(res, ref_r, PP));
    check({what, ": on curve"}, on_curve(res, BB, PP));
    check({what, ": coordinates <= p"}, res.x <= PP && res.y <= PP && res.z <= PP);
    check({what, ": latency"}, cyc - t0 == LAT);
    if (cyc - t0 != LAT) $display("  latency %0d, expected %0d", cyc - t0, LAT);
    last_out = res;
  endtask

  initial begin : main
    rpoint_t g, o, ng;
    g.x = 544'h79BE667EF9DCBBAC55A06295CE870B07029BFCDB2DCE28D959F2815B16F81798;
    g.y = 544'h483ADA7726A3C4655DA4FBFC0E1108A8FD17B448A68554199C47D08FFB10D4B8;
    g.z = 1;
    o.x = 0; o.y = 1; o.z = 0;
    ng = g; ng.y = PP - g.y;
    pts[0] = g;
    for (int i = 1; i < 8; i++) pts[i] = padd(pts[i-1], g, 3 * BB, PP);
    // the reference itself: 2G must have the published x coordinate
    check("reference 2G", affine_x(pts[1], PP) ==
          544'hC6047F9441ED7D6D3045406E95C07CD85C778E4B8CEF3CA7ABAC09B95C709EE5);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    do_add(o, g, "O+G");
    do_add(g, o, "G+O");
    do_add(g, g, "G+G");
    do_add(rerep(g), rerep(ng), "G+(-G)");
    check("G+(-G) is O", last_out.z % PP == 0 && last_out.x % PP == 0 && last_out.y % PP != 0);
    do_add(o, o, "O+O");
    for (int n = 0; n < NTEST; n++) begin
      int ia, ib;
      rpoint_t a;
      ia = int'($urandom_range(7)); ib = int'($urandom_range(7));
      case (n % 4)
        0: do_add(rerep(pts[ia]), rerep(pts[ib]), "random sum");
        1: do_add(rerep(pts[ia]), rerep(pts[ia]), "doubling");
        2: do_add(last_out, rerep(pts[ib]), "chained sum");
        default: begin
          a = last_out;
          do_add(a, a, "chained doubling");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((NTEST + 10) * (LAT + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

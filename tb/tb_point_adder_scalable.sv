// tb_point_adder_scalable: point additions on secp256k1 through the bit-serial
// Montgomery ALU.
//
// point_adder with SCALABLE = 1 and otherwise default parameters (K = 256,
// secp256k1 prime, b = 7). A whole scalar multiplication with the bit-serial
// ALU takes about 5.9e8 cycles, too many to simulate, so this runs a few
// complete point additions at full size instead: O+G, G+G, G+(-G) = O and
// random sums and doublings of multiples of G in random projective
// representations. Each result must equal the affine-arithmetic reference
// sum, lie on the curve and have coordinates <= p. The start-to-done latency
// must be 17*((K+4)^2+2) + 19*(K+5) + 1 cycles: 17 products and scalings of
// (K+4)^2+1 cycles and 19 additions and subtractions of K+4 cycles, each with
// one issue cycle, plus the done cycle.
`timescale 1ns/1ps
module tb_point_adder_scalable;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 256;
  localparam big_t PP = big_t'({{(K-33){1'b1}}, 1'b0, 32'hFFFF_FC2F});
  localparam big_t BB = 7;
  localparam int unsigned NTEST = 3;
  localparam int unsigned LAT = 17 * ((K + 4) * (K + 4) + 2) + 19 * (K + 5) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0;
  logic [2:0][K+1:0] pt1_in = '0, pt2_in = '0, pt3_out;
  logic busy, done;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  point_adder #(.SCALABLE(1'b1)) dut (.*);

  rpoint_t pts[4];
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
    pt1_in = {(K+2)'(a.z), (K+2)'(a.y), (K+2)'(a.x)};
    pt2_in = {(K+2)'(b.z), (K+2)'(b.y), (K+2)'(b.x)};
    load = 1'b1; start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); load = 1'b0; start = 1'b0;
    while (!done) @(negedge clk);
    res.x = big_t'(pt3_out[0]); res.y = big_t'(pt3_out[1]); res.z = big_t'(pt3_out[2]);
    ref_r = padd(a, b, 3 * BB, PP);
    check({what, ": equals reference"}, peq(res, ref_r, PP));
    check({what, ": on curve"}, on_curve(res, BB, PP));
    check({what, ": coordinates <= p"}, res.x <= PP && res.y <= PP && res.z <= PP);
    check({what, ": latency"}, cyc - t0 == LAT);
    $display("%s: %0d cycles (expected %0d)", what, cyc - t0, LAT);
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
    for (int i = 1; i < 4; i++) pts[i] = padd(pts[i-1], g, 3 * BB, PP);
    check("reference 2G", affine_x(pts[1], PP) ==
          544'hC6047F9441ED7D6D3045406E95C07CD85C778E4B8CEF3CA7ABAC09B95C709EE5);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    do_add(o, g, "O+G");
    do_add(g, g, "G+G");
    check("G+G is 2G", affine_x(last_out, PP) == affine_x(pts[1], PP));
    do_add(rerep(g), rerep(ng), "G+(-G)");
    check("G+(-G) is O", last_out.z % PP == 0 && last_out.x % PP == 0 && last_out.y % PP != 0);
    for (int n = 0; n < NTEST; n++) begin
      int ia, ib;
      ia = int'($urandom_range(3)); ib = int'($urandom_range(3));
      if (n == 1) do_add(rerep(pts[ia]), rerep(pts[ia]), "doubling");
      else        do_add(rerep(pts[ia]), rerep(pts[ib]), "random sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((NTEST + 4) * (LAT + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

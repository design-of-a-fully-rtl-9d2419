// tb_mmalu: self-checking testbench of mmalu.
//
// Drives random operands within the documented input bounds through all four
// operations and checks each result against plain modular arithmetic:
// products satisfy S*R = A*B (mod p) and S < 2p (S < 5p/4 for inputs < 2p),
// scaling gives S*R = A (mod p) with S <= p, addition gives exactly A+B and
// subtraction exactly A-B+2p. It also checks the latency from en to done.
// Corner operands (0, 1, p-1, 4p-1 and 2p-1) are included.
`timescale 1ns/1ps
module tb_mmalu;
  import ecc_ref_pkg::*;

  localparam int unsigned K = 64;
  localparam logic [K-1:0] P = 64'hFFFF_FFFF_FFFF_FFC5;
  localparam int unsigned NTEST = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, cmd = 1'b0, sub = 1'b0;
  logic [K+1:0] a = '0, b = '0, s;
  logic done;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mmalu #(.K(K), .P(P)) dut (.*);

  function automatic big_t rnd_below(big_t lim);
    big_t r = '0;
    for (int i = 0; i < 17; i++) r = {r[511:0], 32'($urandom)};
    return r % lim;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h s=%h", what, a, b, s);
    end
  endtask

  // run one operation, return the en-to-done latency in cycles
  task automatic run(input logic c, input logic sb, input big_t av, input big_t bv, output int lat);
    int unsigned t0;
    @(negedge clk);
    a = (K+2)'(av); b = (K+2)'(bv); cmd = c; sub = sb; en = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); en = 1'b0;
    while (!done) @(negedge clk);
    lat = int'(cyc - t0);
  endtask

  initial begin : main
    big_t pp, rr, av, bv, sv;
    int lat, kind;
    pp = big_t'(P);
    rr = big_t'(1) << (K + 4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      kind = n % 4;
      // operand classes: random in range, or corners
      case (kind)
        0, 1: begin                                  // multiply
          big_t lim;
          lim = (kind == 0) ? 4 * pp : 2 * pp;
          av = rnd_below(lim); bv = rnd_below(lim);
          if (n < 8) begin av = (n < 4) ? lim - 1 : 0; bv = lim - 1; end
          run(1'b0, 1'b0, av, bv, lat);
          sv = big_t'(s);
          check("mul congruence", mulm(sv, rr, pp) == mulm(av, bv, pp));
          check("mul bound", (kind == 0) ? (sv < 2 * pp) : (4 * sv < 5 * pp));
          check("mul latency", lat == K + 5);
        end
        2: begin                                     // scale
          av = (n < 8) ? 4 * pp - 1 : rnd_below(4 * pp);
          run(1'b0, 1'b1, av, rnd_below(4 * pp), lat);
          sv = big_t'(s);
          check("scale congruence", mulm(sv, rr, pp) == av % pp);
          check("scale bound", sv <= pp);
          check("scale latency", lat == K + 5);
        end
        default: begin                               // add or subtract
          bit sb;
          sb = n[2];
          av = rnd_below(2 * pp); bv = rnd_below(2 * pp);
          if (n < 16) begin av = sb ? 0 : 2 * pp - 1; bv = 2 * pp - 1; end
          run(1'b1, sb, av, bv, lat);
          sv = big_t'(s);
          check(sb ? "sub value" : "add value", sb ? (sv == av + 2 * pp - bv) : (sv == av + bv));
          check("add latency", lat == 2);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NTEST * ((K + 4) * (K + 4) + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

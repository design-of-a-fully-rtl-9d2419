// tb_pa_fsm: self-checking testbench of pa_fsm.
//
// The testbench plays the register file and the MMALU: it answers every
// alu_en with a done pulse after a random delay, executes the emitted
// instruction (cmd, sub, LO, RO, WA) on a model register file with exact
// arithmetic modulo a small prime (products carry the Montgomery factor
// R^-1), and writes the result when we is asserted. After the run the model's
// X1:Y1:Z1 must equal the complete addition formula applied to the two input
// points, as projective points. So the emitted program is checked for what
// it computes, not compared with a copy of itself. It also checks: 36
// operations and 36 writes per run, 17 of them Montgomery products or
// scalings, a write only in answer to done, no new alu_en while an operation
// is pending, busy from start to done, and a done pulse after the last write.
`timescale 1ns/1ps
module tb_pa_fsm;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam big_t PP = 65521;                 // prime, 16 bits
  localparam big_t BB = 5;
  localparam int unsigned KR = 20;             // R = 2^(16+4)

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, alu_done = 1'b0;
  logic alu_en, alu_cmd, alu_sub, we, busy, done;
  lo_addr_e lo;
  ro_addr_e ro;
  wr_addr_e wa;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pa_fsm dut (.*);

  // model registers: 0 X1, 1 Y1, 2 Z1, 3 X2, 4 Y2, 5 Z2, 6 t0, 7 t1, 8 t2, 9 t3, 10 t4
  big_t rf[11];
  big_t rinv, b3m, result;
  bit pending = 0;
  int n_en = 0, n_we = 0, n_mul = 0, n_early_en = 0, n_bad_we = 0;
  int delay = 0;

  function automatic int lo_idx(int a);
    int map[8] = '{0, 1, 2, 3, 4, 6, 8, 9};
    return map[a];
  endfunction
  function automatic int ro_idx(int a);
    int map[8] = '{0, 1, 4, 5, 6, 7, 10, -1};
    return map[a];
  endfunction
  function automatic int wa_idx(int a);
    int map[8] = '{0, 1, 2, 4, 7, 8, 9, 10};
    return map[a];
  endfunction

  // model ALU: responds to alu_en after a random delay
  always @(posedge clk) begin
    alu_done <= 1'b0;
    if (alu_en) begin
      big_t a, b;
      if (pending) n_early_en++;
      n_en++;
      a = rf[lo_idx(int'(lo))];
      b = (ro == R_B3) ? b3m : rf[ro_idx(int'(ro))];
      unique case ({alu_cmd, alu_sub})
        2'b00: begin result = mulm(mulm(a, b, PP), rinv, PP); n_mul++; end
        2'b01: begin result = mulm(a, rinv, PP); n_mul++; end
        2'b10: result = addm(a, b, PP);
        default: result = subm(a, b, PP);
      endcase
      pending = 1;
      delay = int'($urandom_range(4));
    end else if (pending) begin
      if (delay == 0) begin
        alu_done <= 1'b1;
        pending = 0;
      end else delay--;
    end
    if (we) begin
      if (!alu_done) n_bad_we++;
      n_we++;
      if (wa == W_T1) rf[6] = rf[7];
      rf[wa_idx(int'(wa))] = result;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic big_t rnd_p();
    return big_t'($urandom_range(65520));
  endfunction

  initial begin : main
    rpoint_t p1, p2, exp_r, got;
    rinv = powm(powm(2, big_t'(KR), PP), PP - 2, PP);
    b3m = mulm(3 * BB, powm(2, big_t'(KR), PP), PP);
    for (int i = 0; i < 11; i++) rf[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 12; rep++) begin
      int t0, lat;
      p1.x = rnd_p(); p1.y = rnd_p(); p1.z = rnd_p();
      p2.x = rnd_p(); p2.y = rnd_p(); p2.z = rnd_p();
      if (rep == 0) p1 = p2;                   // doubling
      rf[0] = p1.x; rf[1] = p1.y; rf[2] = p1.z;
      rf[3] = p2.x; rf[4] = p2.y; rf[5] = p2.z;
      n_en = 0; n_we = 0; n_mul = 0;
      @(negedge clk);
      check("idle before start", !busy);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin
        check("busy while running", busy);
        @(negedge clk);
      end
      check("36 operations", n_en == 36);
      check("36 writes", n_we == 36);
      check("17 products and scalings", n_mul == 17);
      @(negedge clk);
      check("idle after done", !busy && !done);
      // formulas without Montgomery factors, equality up to a common factor
      exp_r = padd(p1, p2, 3 * BB, PP);
      got.x = rf[0]; got.y = rf[1]; got.z = rf[2];
      check("result equals complete addition",
            mulm(got.x, exp_r.z, PP) == mulm(exp_r.x, got.z, PP) &&
            mulm(got.y, exp_r.z, PP) == mulm(exp_r.y, got.z, PP) &&
            mulm(got.x, exp_r.y, PP) == mulm(exp_r.x, got.y, PP) &&
            (got.x != 0 || got.y != 0 || got.z != 0));
    end
    check("no alu_en while pending", n_early_en == 0);
    check("writes only on done", n_bad_we == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

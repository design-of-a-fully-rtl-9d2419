// tb_pa_regfile: self-checking testbench of pa_regfile.
//
// Keeps a model of the eleven registers and, after loads and random writes,
// compares both read ports at all eight addresses and the output point with
// the model. Checks that writing t1 moves the old t1 into t0, that load
// copies both input points and clears the temporaries, that nothing is
// written while we is low, and that the eighth right-port address reads the
// constant B3.
`timescale 1ns/1ps
module tb_pa_regfile;
  import ecc_pkg::*;

  localparam int unsigned K = 16;
  localparam logic [K+1:0] B3 = 18'h2_A5C3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, we = 1'b0;
  logic [2:0][K+1:0] pt1_in = '0, pt2_in = '0, pt3_out;
  lo_addr_e lo = L_X1;
  ro_addr_e ro = R_X1;
  wr_addr_e wa = W_X1;
  logic [K+1:0] din = '0, lo_data, ro_data;
  int checks = 0, failures = 0;

  // model: 0 X1, 1 Y1, 2 Z1, 3 X2, 4 Y2, 5 Z2, 6 t0, 7 t1, 8 t2, 9 t3, 10 t4
  logic [K+1:0] mdl[11] = '{default: '0};

  always #5 clk = ~clk;

  pa_regfile #(.K(K), .B3(B3)) dut (.*);

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

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    for (int a = 0; a < 8; a++) begin
      lo = lo_addr_e'(a); ro = ro_addr_e'(a);
      #1;
      check($sformatf("LO %0d", a), lo_data == mdl[lo_idx(a)]);
      check($sformatf("RO %0d", a), ro_data == ((a == 7) ? B3 : mdl[ro_idx(a)]));
    end
    check("output point", pt3_out == {mdl[2], mdl[1], mdl[0]});
  endtask

  initial begin : main
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      // load
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        pt1_in[c] = (K+2)'($urandom);
        pt2_in[c] = (K+2)'($urandom);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int c = 0; c < 3; c++) begin mdl[c] = pt1_in[c]; mdl[3 + c] = pt2_in[c]; end
      for (int t = 6; t < 11; t++) mdl[t] = '0;
      check_all();
      // random writes, some with we low
      for (int n = 0; n < 30; n++) begin
        bit w;
        @(negedge clk);
        w = ($urandom_range(3) != 0);
        wa = wr_addr_e'($urandom_range(7));
        din = (K+2)'($urandom);
        we = w;
        @(negedge clk);
        we = 1'b0;
        if (w) begin
          if (wa == W_T1) mdl[6] = mdl[7];
          mdl[wa_idx(int'(wa))] = din;
        end
        check_all();
      end
    end
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

// pa_fsm: sequencer of the point adder.
//
// Walks through the 36-step point-addition program of ecc_pkg::pa_program.
// The current step is held in an instruction register {opcode, LO, RO, WA}
// whose fields drive the register-file read addresses, the MMALU's cmd/sub
// inputs and the write address. For each step the FSM pulses alu_en for one
// cycle (ISSUE), waits for the MMALU's done pulse (WAIT) and in that same
// cycle asserts we so the result is written at the next clock edge. Every
// point addition runs the same instruction sequence regardless of the data,
// so its duration and its sequence of operations are constant.
//
// Interface: start (one-cycle pulse while idle) begins a point addition; done
// pulses for one cycle after the last result is written; busy is high from
// start to done. Timing: per step one ISSUE cycle, the MMALU run (K+4 cycles
// for a product or scale, 1 for an add or subtract with the full-word MMALU)
// and the write cycle: 17*(K+6) + 19*3 cycles per point addition.
// The instruction fields and the program follow the document; the ISSUE/WAIT
// handshake is this design's own.
module pa_fsm
  import ecc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      alu_done,
  output logic      alu_en,
  output logic      alu_cmd,
  output logic      alu_sub,
  output lo_addr_e  lo,
  output ro_addr_e  ro,
  output logic      we,
  output wr_addr_e  wa,
  output logic      busy,
  output logic      done
);

  typedef enum logic [1:0] {IDLE, ISSUE, WAIT} state_e;

  state_e     state;
  logic [5:0] step;
  pa_instr_t  instr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      step  <= '0;
      instr <= pa_program(6'd0);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          step  <= '0;
          instr <= pa_program(6'd0);
          state <= ISSUE;
        end
        ISSUE: state <= WAIT;
        WAIT: if (alu_done) begin
          if (step == 6'(PA_STEPS - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            step  <= step + 1'b1;
            instr <= pa_program(step + 1'b1);
            state <= ISSUE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign alu_en  = (state == ISSUE);
  assign {alu_cmd, alu_sub} = instr.op;
  assign lo      = instr.lo;
  assign ro      = instr.ro;
  assign wa      = instr.wa;
  assign we      = (state == WAIT) && alu_done;
  assign busy    = (state != IDLE);

endmodule

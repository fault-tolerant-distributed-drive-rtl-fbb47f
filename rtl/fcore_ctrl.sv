// fcore_ctrl: femtoCore control unit and instruction decoder.
//
// Waits for the start trigger, then streams the program from the
// instruction store (word at pc on imem_data one cycle after imem_addr) and
// issues one operation per clock. There are no jumps, so the sequence is
// fixed. Decoding has two steps: the first pulls the constant out of the
// stream (an LDC word is held and the following word becomes its operand),
// the second splits the fields, drives the register file read addresses in
// the issue cycle and registers op/immediate/tag for the execution unit.
//
// SIMD: with n_ch > 1 every instruction is issued once per channel
// (channel counter 0..n_ch-1, register bank {channel, reg}) before pc
// advances. n_ch = 1 is plain scalar execution.
//
// Execution stops at STOP or at the end of the store; after the pipeline
// drains (the last write has landed) done pulses for one cycle and running
// falls. A run therefore takes, from the start pulse to done,
// S + 2 + DRAIN cycles (DRAIN = LATENCY + 2), whatever the data, where S
// counts n_ch issue slots per instruction before STOP and n_ch + 1 per LDC. Operands are read in the issue cycle, a result is
// written LATENCY+1 cycles after its issue cycle, so an instruction that
// reads a result must be issued at least LATENCY+2 slots after its producer:
// six delay slots in scalar mode, none with seven or more channels.
module fcore_ctrl #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned CW       = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  parameter int unsigned IAW      = 10,
  parameter int unsigned LATENCY  = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CW:0]      n_ch,
  output logic             running,
  output logic             done,
  // instruction store core port
  output logic [IAW-1:0]   imem_addr,
  input  logic [31:0]      imem_data,
  // register file read addresses (issue cycle)
  output logic [CW+5:0]    ra_addr,
  output logic [CW+5:0]    rb_addr,
  // execution unit issue (registered, aligned with register read data)
  output logic             ex_valid,
  output logic [4:0]       ex_op,
  output logic [31:0]      ex_imm,
  output logic [CW+5:0]    ex_tag
);
  import fcore_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  localparam int unsigned DRAIN = LATENCY + 2;

  logic [IAW-1:0] pc, pc_next;
  logic [CW-1:0]  ch, ch_next;
  logic           ldc_pend, ldc_pend_next;
  logic [5:0]     ldc_dest;
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;

  // issue decision (combinational, step 1 + field split)
  logic        iss_valid, advance, stop_now, last_ch;
  logic [4:0]  iss_op;
  logic [5:0]  fa, fb, fd;
  logic [31:0] iss_imm;
  logic [4:0]  op_w;
  format_t     fmt;

  assign op_w    = imem_data[4:0];
  assign fmt     = op_format(op_w);
  assign last_ch = ({1'b0, ch} == n_ch - 1'b1) || (n_ch <= 1);

  always_comb begin
    iss_valid     = 1'b0;
    iss_op        = OP_NOP;
    iss_imm       = imem_data;
    fa            = imem_data[10:5];
    fb            = (fmt == FMT_BINARY) ? imem_data[16:11] : 6'd0;
    fd            = (fmt == FMT_BINARY) ? imem_data[22:17] : imem_data[16:11];
    advance       = 1'b0;
    stop_now      = 1'b0;
    ldc_pend_next = ldc_pend;
    ch_next       = ch;
    if (state == S_RUN) begin
      if (ldc_pend) begin
        // step 1: this word is the constant of the held LDC
        iss_valid = 1'b1;
        iss_op    = OP_LDC;
        fa        = 6'd0;
        fb        = 6'd0;
        fd        = ldc_dest;
        if (last_ch) begin
          advance = 1'b1;
          ldc_pend_next = 1'b0;
        end
      end else if (op_w == OP_STOP) begin
        stop_now = 1'b1;
      end else if (op_w == OP_LDC) begin
        ldc_pend_next = 1'b1;
        advance = 1'b1;
        ch_next = '0;
      end else begin
        iss_valid = 1'b1;
        iss_op    = op_w;
        advance   = last_ch;
      end
      if (iss_valid) ch_next = last_ch ? '0 : ch + 1'b1;
    end
    pc_next   = (state == S_RUN && advance) ? pc + 1'b1 : (state == S_RUN ? pc : '0);
    imem_addr = pc_next;
    ra_addr   = {ch, fa};
    rb_addr   = {ch, fb};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      ch        <= '0;
      ldc_pend  <= 1'b0;
      ldc_dest  <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
      ex_valid  <= 1'b0;
    end else begin
      done     <= 1'b0;
      ex_valid <= iss_valid;
      case (state)
        S_IDLE: begin
          pc <= '0;
          ch <= '0;
          ldc_pend <= 1'b0;
          if (start) state <= S_RUN;
        end
        S_RUN: begin
          pc       <= pc_next;
          ch       <= ch_next;
          ldc_pend <= ldc_pend_next;
          if (!ldc_pend && op_w == OP_LDC) ldc_dest <= imem_data[10:5];
          // end of program: STOP, or the last word of the store retired
          if (stop_now || (advance && pc == IAW'((1 << IAW) - 1))) begin
            state     <= S_DRAIN;
            drain_cnt <= '0;
          end
        end
        default: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (32'(drain_cnt) == DRAIN - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    ex_op  <= iss_op;
    ex_imm <= iss_imm;
    ex_tag <= {ch, fd};
  end

  assign running = (state != S_IDLE);

  // the channel count must be 1..CHANNELS while running
  assert property (@(posedge clk) disable iff (!rst_n)
                   running |-> (n_ch >= 1 && 32'(n_ch) <= CHANNELS));

endmodule

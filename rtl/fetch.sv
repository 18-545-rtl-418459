// fetch: instruction fetch unit of the coordinate transform pipeline.
//
// The PC register holds the word address of the current instruction; the
// instruction cache returns that word combinationally (instr_in). Every cycle in
// which the decode unit does not stall, the PC moves to the next instruction:
// pc + 1, plus the data field when the type bit is set, so argument words are
// stepped over. start (one cycle) sets the PC to 0 and starts the program. An
// all-zero word marks the end of the program: fetch stops there, drops running and
// raises done until the next start. The PC stepping and the stall follow the
// original design; the start/end-of-program convention is this design's choice.
module fetch
  import gl_pkg::*;
(
    input  logic        clk,
    input  logic        rst,
    input  logic        start,
    input  logic        stall,
    input  logic [31:0] instr_in,
    output logic [31:0] pc,
    output instr_t      instr,
    output logic        valid,
    output logic        running,
    output logic        done
);
  logic [31:0] next_pc;

  assign instr   = instr_t'(instr_in);
  assign valid   = running && (instr_in != 32'd0);
  assign next_pc = pc + 32'd1 + (instr.is_type ? 32'(instr.data) : 32'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      pc      <= '0;
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running) begin
      if (instr_in == 32'd0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (!stall) begin
        pc <= next_pc;
      end
    end
  end
endmodule

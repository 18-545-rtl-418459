// matrix_stack: one OpenGL matrix stack (modelview or projection).
//
// DEPTH entries of 4x4 single-precision matrices held in registers, so the top of
// the stack is read combinationally (top). After reset the stack pointer points at
// the bottom entry, which holds the identity matrix. One operation per clock:
//   push      copy the top into the next entry and make it the top
//   pop       drop the top (the bottom entry is never popped)
//   load_id   overwrite the top with the identity matrix
//   wr_en     overwrite row wr_row of the top with wr_data (the matrix multiplier
//             updates a matrix one row at a time)
// A push on a full stack or a pop at the bottom is ignored and raises error for one
// cycle. Depth 16, identity at the bottom and the combinational read follow the
// original design; the error flag and the priority push > pop > load_id > wr_en
// are this design's choices.
module matrix_stack
  import gl_pkg::*;
#(
    parameter int DEPTH = 16
) (
    input  logic        clk,
    input  logic        rst,
    input  logic        push,
    input  logic        pop,
    input  logic        load_id,
    input  logic        wr_en,
    input  logic [1:0]  wr_row,
    input  vec4_t       wr_data,
    output mat4_t       top,
    output logic [$clog2(DEPTH)-1:0] sp,
    output logic        error
);
  mat4_t stack [DEPTH];

  assign top = stack[sp];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp       <= '0;
      stack[0] <= mat_identity();
      error    <= 1'b0;
    end else begin
      error <= 1'b0;
      if (push) begin
        if (int'(sp) == DEPTH - 1) error <= 1'b1;
        else begin
          stack[sp + 1'b1] <= stack[sp];
          sp               <= sp + 1'b1;
        end
      end else if (pop) begin
        if (sp == '0) error <= 1'b1;
        else          sp    <= sp - 1'b1;
      end else if (load_id) begin
        stack[sp] <= mat_identity();
      end else if (wr_en) begin
        stack[sp][wr_row] <= wr_data;
      end
    end
  end
endmodule

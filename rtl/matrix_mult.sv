// matrix_mult: 4x4 by 4x4 matrix multiply sequencer, C = A x B.
//
// One element per clock through matrix_row_comp, so a full product takes 16 cycles:
// cycle n computes C[i][j] with i = n/4 and j = n%4. The sequencer asks for row i of
// A (a_row_sel -> a_row) and column j of B (b_col_sel -> b_col), both read
// combinationally by the caller. Elements of a row are collected and, in the cycle of
// the row's last element, the whole row is offered on row_data with row_we high and
// row_idx = i, so the caller can write it back into A one row at a time (row i of A
// is never read again after that). done is high in the 16th cycle; start in that
// cycle begins the next product back to back. busy is high in all 16 cycles.
// Timing (16 cycles, one row per 4 cycles, 4 multipliers and 3 adders) follows the
// original design; the handshake is this design's choice.
module matrix_mult
  import gl_pkg::*;
(
    input  logic       clk,
    input  logic       rst,
    input  logic       start,
    output logic [1:0] a_row_sel,
    input  vec4_t      a_row,
    output logic [1:0] b_col_sel,
    input  vec4_t      b_col,
    output logic       row_we,
    output logic [1:0] row_idx,
    output vec4_t      row_data,
    output logic       busy,
    output logic       done
);
  logic       active;
  logic [3:0] cnt;
  vec4_t      acc;
  float_t     elem;

  matrix_row_comp u_row (.row(a_row), .col(b_col), .y(elem));

  assign busy      = active;
  assign a_row_sel = cnt[3:2];
  assign b_col_sel = cnt[1:0];
  assign row_idx   = cnt[3:2];
  assign row_we    = active && (cnt[1:0] == 2'd3);
  assign done      = active && (cnt == 4'd15);

  always_comb begin
    row_data    = acc;
    row_data[3] = elem;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      cnt    <= '0;
      acc    <= '0;
    end else begin
      if (active) begin
        acc[cnt[1:0]] <= elem;
        cnt           <= cnt + 4'd1;
        if (done) active <= 1'b0;
      end
      if (start && (!active || done)) begin
        active <= 1'b1;
        cnt    <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) start |-> (!active || done))
    else $error("matrix_mult started while busy");
endmodule

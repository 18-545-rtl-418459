// decode: decode unit and controller of the coordinate transform pipeline.
//
// It looks at the instruction presented by the fetch unit, reads up to four
// argument words from the instruction cache (addr2 -> args), drives the matrix
// stacks and the matrix multiplier, and pushes transformed vertices with their
// colour towards the rasterizer. It holds the current viewport, matrix mode and
// colour. stall is high until the current instruction completes; single-cycle
// instructions complete in the cycle they are presented.
//
//   glColor         colour register <= 3 argument floats
//   glMatrixMode    mode <= data bit 0 (0 modelview, 1 projection, as GL_MODELVIEW
//                   0x1700 and GL_PROJECTION 0x1701 differ in bit 0)
//   glLoadIdentity, glPushMatrix, glPopMatrix   one stack operation
//   glViewport      four integer arguments converted to float; w/2 and h/2 stored
//   glMultMatrix    top = top x M, M the 16 argument floats in column-major order;
//                   column j is read from pc+1+4j while the multiplier works on it
//   glLoadMatrix    identity loaded, then multiplied by M (1 + 16 cycles)
//   glScale, glTranslate   top = top x S or top x T, S/T built from 3 arguments
//   glVertex        eye = MV x (x,y,z,1) then clip = P x eye, each a full 16-cycle
//                   pass of the multiplier (32 cycles), then one cycle to push the
//                   divided, viewport-mapped vertex and the colour; waits while the
//                   FIFOs are full
//   glFlush         pushes the flush marker (all coordinates 0xFFFFFFFF)
//   glBegin, glEnd, glRotate, glFrustum, glOrtho   no hardware action; rotation and
//                   projection matrices are computed in software and sent as
//                   glMultMatrix/glLoadMatrix
//
// What each instruction does follows the original design; the cycle-level sequencing,
// the reset state (640x480 viewport, white, modelview) and the treatment of
// glRotate/glFrustum/glOrtho are this design's choices.
module decode
  import gl_pkg::*;
(
    input  logic        clk,
    input  logic        rst,
    input  instr_t      instr,
    input  logic        valid,
    input  logic [31:0] pc,
    output logic        stall,
    output logic [31:0] addr2,
    input  vec4_t       args,
    // matrix stacks: stk_sel picks the stack that is operated on and read as A
    output logic        stk_sel,
    output logic        stk_push,
    output logic        stk_pop,
    output logic        stk_load_id,
    output logic        stk_wr_en,
    // matrix multiplier
    output logic        mult_start,
    input  logic [1:0]  mult_col_sel,
    output vec4_t       b_col,
    input  logic        mult_row_we,
    input  logic [1:0]  mult_row_idx,
    input  vec4_t       mult_row_data,
    input  logic        mult_done,
    // state and vertex output
    output logic        matrix_mode,
    output float_t      vp_x,
    output float_t      vp_y,
    output float_t      vp_hw,
    output float_t      vp_hh,
    output vec3_t       color,
    output vec4_t       clip,
    output logic        out_valid,
    output logic        out_flush,
    input  logic        out_full
);
  typedef enum logic [2:0] {S_IDLE, S_MAT, S_VMV, S_VP, S_VOUT} state_e;

  state_e state, next_state;
  vec4_t  eye;
  logic   instr_done;
  opcode_e op;

  assign op = opcode_e'(instr.opcode);

  always_comb begin
    next_state  = state;
    instr_done  = 1'b0;
    stk_push    = 1'b0;
    stk_pop     = 1'b0;
    stk_load_id = 1'b0;
    stk_wr_en   = 1'b0;
    mult_start  = 1'b0;
    out_valid   = 1'b0;
    out_flush   = 1'b0;
    case (state)
      S_IDLE: if (valid) begin
        case (op)
          OP_LOAD_IDENTITY: begin stk_load_id = 1'b1; instr_done = 1'b1; end
          OP_PUSH_MATRIX:   begin stk_push = 1'b1;    instr_done = 1'b1; end
          OP_POP_MATRIX:    begin stk_pop = 1'b1;     instr_done = 1'b1; end
          OP_MULT_MATRIX, OP_SCALE, OP_TRANSLATE: begin
            mult_start = 1'b1;
            next_state = S_MAT;
          end
          OP_LOAD_MATRIX: begin
            stk_load_id = 1'b1;
            mult_start  = 1'b1;
            next_state  = S_MAT;
          end
          OP_VERTEX: begin
            mult_start = 1'b1;
            next_state = S_VMV;
          end
          OP_FLUSH: begin
            out_valid  = 1'b1;
            out_flush  = 1'b1;
            instr_done = !out_full;
          end
          default: instr_done = 1'b1;
        endcase
      end
      S_MAT: begin
        stk_wr_en = mult_row_we;
        if (mult_done) begin
          instr_done = 1'b1;
          next_state = S_IDLE;
        end
      end
      S_VMV: if (mult_done) begin
        mult_start = 1'b1;
        next_state = S_VP;
      end
      S_VP: if (mult_done) next_state = S_VOUT;
      S_VOUT: begin
        out_valid = 1'b1;
        if (!out_full) begin
          instr_done = 1'b1;
          next_state = S_IDLE;
        end
      end
      default: next_state = S_IDLE;
    endcase
    stall = valid && !instr_done;
  end

  always_comb begin
    case (state)
      S_VMV:   stk_sel = 1'b0;
      S_VP:    stk_sel = 1'b1;
      default: stk_sel = matrix_mode;
    endcase
  end

  // argument words and the B operand of the multiplier
  always_comb begin
    addr2 = pc + 32'd1;
    b_col = '{default: FP_ZERO};
    case (state)
      S_MAT: case (op)
        OP_MULT_MATRIX, OP_LOAD_MATRIX: begin
          addr2 = pc + 32'd1 + {28'd0, mult_col_sel, 2'b00};
          b_col = args;
        end
        OP_SCALE:
          if (mult_col_sel == 2'd3) b_col[3] = FP_ONE;
          else b_col[mult_col_sel] = args[mult_col_sel];
        OP_TRANSLATE:
          if (mult_col_sel == 2'd3) b_col = '{FP_ONE, args[2], args[1], args[0]};
          else b_col[mult_col_sel] = FP_ONE;
        default: ;
      endcase
      S_VMV: if (mult_col_sel == 2'd0) b_col = '{FP_ONE, args[2], args[1], args[0]};
      S_VP:  if (mult_col_sel == 2'd0) b_col = eye;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      matrix_mode <= 1'b0;
      vp_x        <= FP_ZERO;
      vp_y        <= FP_ZERO;
      vp_hw       <= 32'h43a0_0000;  // 320.0
      vp_hh       <= 32'h4370_0000;  // 240.0
      color       <= '{FP_ONE, FP_ONE, FP_ONE};
      eye         <= '0;
      clip        <= '0;
    end else begin
      state <= next_state;
      if (state == S_IDLE && valid) begin
        case (op)
          OP_COLOR:       color <= '{args[0], args[1], args[2]};
          OP_MATRIX_MODE: matrix_mode <= instr.data[0];
          OP_VIEWPORT: begin
            vp_x  <= fp_from_int(args[0]);
            vp_y  <= fp_from_int(args[1]);
            vp_hw <= fp_mul(fp_from_int(args[2]), FP_HALF);
            vp_hh <= fp_mul(fp_from_int(args[3]), FP_HALF);
          end
          default: ;
        endcase
      end
      if (state == S_VMV && mult_row_we) eye[mult_row_idx]  <= mult_row_data[0];
      if (state == S_VP && mult_row_we)  clip[mult_row_idx] <= mult_row_data[0];
    end
  end
endmodule

// inst_dec: the instruction decoder (INSTDEC).
//
// It casts the 128-bit instruction word into its fields and, with a small
// step counter, produces the control of each clock cycle of the instruction
// (uop_t).  An instruction takes these cycles (immediate / data form):
//   FLD  1 / 2   data form: read the length word into A, then extract
//   VLD  1
//   FOR  1       data form reads the loop count in the same cycle
//   FNC  1       data form reads the function address in the same cycle
//   BRP  2 / 3   one / two conditions with immediate values: read the
//                first data word, then compare it while reading the second,
//                then compare the second and combine
//        2 / 4   one / two conditions compared with data words
//   BRN  1 / 2   one / two conditions, one compare per cycle
//   CMP  2 / 3   read A, (read B,) compute and write back
// A cycle that the functional unit stalls (too few bitstream bits) repeats;
// the step counter moves only when run is high and stall is low, and
// returns to zero after the last cycle.
//
// The cycle counts of the immediate forms are the published ones; the
// instruction encoding and the four-cycle data form of BRP are this
// design's own.
module inst_dec
  import parser_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [INST_W-1:0] iword,
  input  logic              run,
  input  logic              stall,
  output inst_t             inst,
  output uop_t              u
);

  logic [1:0] step_q;

  assign inst = inst_t'(iword);

  always_comb begin
    u = '0;
    unique case (inst.op)
      OP_FLD: begin
        if (inst.imm) begin
          u.fld = 1'b1; u.wr = 1'b1; u.last = 1'b1;
        end else if (step_q == 2'd0) begin
          u.rd_en = 1'b1; u.rd_sel = RD_NAME1; u.lat_a = 1'b1;
        end else begin
          u.fld = 1'b1; u.fld_len_a = 1'b1; u.wr = 1'b1; u.last = 1'b1;
        end
      end
      OP_VLD: begin
        u.vld = 1'b1; u.wr = 1'b1; u.last = 1'b1;
      end
      OP_FOR, OP_FNC: begin
        u.rd_en = !inst.imm; u.rd_sel = RD_NAME0; u.last = 1'b1;
      end
      OP_BRP: begin
        if (inst.imm) begin
          unique case (step_q)
            2'd0: begin
              u.rd_en = 1'b1; u.rd_sel = RD_NAME0; u.lat_a = 1'b1;
            end
            2'd1: begin
              u.cmp_en = 1'b1; u.cmp_idx = 1'b0;
              if (inst.two) begin
                u.rd_en = 1'b1; u.rd_sel = RD_NAME1; u.lat_a = 1'b1;
              end else begin
                u.last = 1'b1;
              end
            end
            default: begin
              u.cmp_en = 1'b1; u.cmp_idx = 1'b1; u.last = 1'b1;
            end
          endcase
        end else begin
          unique case (step_q)
            2'd0: begin
              u.rd_en = 1'b1; u.rd_sel = RD_NAME0; u.lat_a = 1'b1;
            end
            2'd1: begin
              u.rd_en = 1'b1; u.rd_sel = RD_VAL0;
              u.cmp_en = 1'b1; u.cmp_idx = 1'b0; u.cmp_rdata = 1'b1;
              u.last = !inst.two;
            end
            2'd2: begin
              u.rd_en = 1'b1; u.rd_sel = RD_NAME1; u.lat_a = 1'b1;
            end
            default: begin
              u.rd_en = 1'b1; u.rd_sel = RD_VAL1;
              u.cmp_en = 1'b1; u.cmp_idx = 1'b1; u.cmp_rdata = 1'b1;
              u.last = 1'b1;
            end
          endcase
        end
      end
      OP_BRN: begin
        u.cmp_en = 1'b1; u.cmp_show = 1'b1; u.cmp_rdata = !inst.imm;
        u.rd_en = !inst.imm;
        if (step_q == 2'd0) begin
          u.cmp_idx = 1'b0; u.rd_sel = RD_VAL0; u.last = !inst.two;
        end else begin
          u.cmp_idx = 1'b1; u.rd_sel = RD_VAL1; u.last = 1'b1;
        end
      end
      OP_CMP: begin
        unique case (step_q)
          2'd0: begin
            u.rd_en = 1'b1; u.rd_sel = RD_NAME0; u.lat_a = 1'b1;
          end
          2'd1: begin
            if (inst.imm) begin
              u.alu = 1'b1; u.wr = 1'b1; u.last = 1'b1;
            end else begin
              u.rd_en = 1'b1; u.rd_sel = RD_NAME1; u.lat_b = 1'b1;
            end
          end
          default: begin
            u.alu = 1'b1; u.wr = 1'b1; u.last = 1'b1;
          end
        endcase
      end
      default: begin
        u.illegal = 1'b1; u.last = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !run)  step_q <= '0;
    else if (!stall)     step_q <= u.last ? 2'd0 : step_q + 2'd1;
  end

endmodule

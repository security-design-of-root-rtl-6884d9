// hbcb: Hardware Boundary Checking for Buffer, the checker of memory
// protection mechanism 2.
//
// A Guard instruction (guard_hit) arms the checker for the current function
// segment. While armed it compares REF_BS (security register s0) with the
// running buffer use: overflow when REF_BS - RT_BS < 0. It uses rt_bs_next,
// which already includes the store now in decode, so the overflow is flagged
// before that store can reach memory. On an overflow, attack pulses, stall
// holds the pipeline for STALL_CYCLES clocks, store_block rises and
// suppresses every store until the segment ends, then the pipeline resumes.
// The segment ends when the function called after the Guard returns to the
// function that issued it (call depth back to 0) or when that function itself
// returns; the checker then disarms and store_block falls. Calls are JAL with
// rd = x1, returns JALR x0, 0(x1).
// The comparison and the stall / block / resume sequence follow the
// document; the segment boundaries and the stall length are this design's
// choices.
module hbcb
  import rv_pkg::*;
#(
  parameter int unsigned STALL_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        guard_hit,
  input  logic        id_valid,
  input  logic [31:0] id_instr,
  input  logic [31:0] ref_bs,
  input  logic [31:0] rt_bs_next,
  output logic        armed,
  output logic        attack,
  output logic        stall,
  output logic        store_block
);
  logic [7:0] depth;
  logic       overflow, seg_end;
  logic [$clog2(STALL_CYCLES+1)-1:0] stall_cnt;

  assign overflow = armed && !guard_hit && ($signed(ref_bs - rt_bs_next) < 0);
  assign attack   = overflow && !store_block;
  assign stall    = attack || (stall_cnt != '0);
  assign seg_end  = armed && id_valid && is_ret(id_instr) && depth <= 8'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed       <= 1'b0;
      depth       <= '0;
      store_block <= 1'b0;
      stall_cnt   <= '0;
    end else begin
      if (attack) stall_cnt <= $bits(stall_cnt)'(STALL_CYCLES - 1);
      else if (stall_cnt != '0) stall_cnt <= stall_cnt - 1'b1;

      if (guard_hit) begin
        armed       <= 1'b1;
        depth       <= '0;
        store_block <= 1'b0;
      end else if (seg_end) begin
        armed       <= 1'b0;
        store_block <= 1'b0;
      end else if (armed) begin
        if (overflow) store_block <= 1'b1;
        if (id_valid && is_call(id_instr)) depth <= depth + 1'b1;
        else if (id_valid && is_ret(id_instr) && depth != '0) depth <= depth - 1'b1;
      end
    end
  end
endmodule

// mp1_ret_guard: memory protection mechanism 1, hardware protection of the
// return addresses saved on the stack. Nothing in software can bypass it.
//
// Control-flow graph in real time: an FSM watches the decode-stage
// instruction stream (id_valid, id_instr) and uses a RAM as a shadow stack:
//   IDLE/BODY --C1 (JAL, rd = x1)--> CALL       a function was entered
//   CALL      --C2 (SW, rs2 = x1)--> PUSH       it saves its return address
//   CALL      --C3 (JALR)--------->  BODY/IDLE  leaf function returned
//   PUSH      -------------------->  BODY       entry {x1, x2+imm} written
//   BODY      --C4 (LW, rd = x1)-->  LOAD       epilogue restores ra
//   LOAD      --C5 (JALR)--------->  POP        function returned
//   POP       -------------------->  BODY/IDLE  entry removed
// (BODY when entries remain, IDLE when the shadow stack is empty.)
// Restricted space: the slot address A of the top entry (the stack slot of
// the current function's return address, x2 + imm of its SW) defines the
// range (A-4, A] that no store may reach; after a POP the range comes from
// the new top entry. Detection: the address of every store in the write-back
// stage (wb_store_valid, wb_store_addr) is checked against the range. The
// store that saves the return address itself is let through once.
// Blocking: on a hit attack pulses, stall holds the processor for
// STALL_CYCLES clocks, store_kill suppresses the offending store
// (combinationally, same cycle) and every later store of the current
// function until it returns, then the processor resumes.
// The FSM conditions C1-C5, the PUSH/POP contents, the (A-4, A] range, the
// write-back check and the stall / block / resume sequence follow the
// document. The shape of the FSM between those conditions, the one-time
// exemption of the saving store, the stall length, the shadow-stack depth and
// what happens when it is full (deeper calls go unprotected, full is raised)
// are this design's choices. reg_x1/reg_x2 are the register-file values of
// ra and sp seen by the decode stage.
module mp1_ret_guard
  import rv_pkg::*;
#(
  parameter int unsigned DEPTH        = 32,
  parameter int unsigned STALL_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        id_valid,
  input  logic [31:0] id_instr,
  input  logic [31:0] reg_x1,
  input  logic [31:0] reg_x2,
  input  logic        wb_store_valid,
  input  logic [31:0] wb_store_addr,
  output logic        attack,
  output logic        stall,
  output logic        store_kill,
  output logic        restrict_valid,
  output logic [31:0] restrict_max,
  output logic [31:0] top_ra,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic        full,
  output logic [2:0]  state_o
);
  typedef enum logic [2:0] {M_IDLE, M_CALL, M_PUSH, M_BODY, M_LOAD, M_POP} mstate_t;
  mstate_t state;

  // shadow stack RAM: {return address, slot address}
  logic [63:0] ram [DEPTH];
  logic [63:0] push_entry;
  logic        save_pending;
  logic [$clog2(DEPTH+1)-1:0] nonrec;   // unrecorded nesting levels

  logic c1, c2, c3, c4, c5;
  assign c1 = id_valid && is_call(id_instr);
  assign c2 = id_valid && is_sw_ra(id_instr);
  assign c3 = id_valid && is_jalr(id_instr);
  assign c4 = id_valid && is_lw_ra(id_instr);
  assign c5 = c3;

  logic [$clog2(DEPTH)-1:0] top_idx, push_idx;
  assign top_idx  = $bits(top_idx)'(depth - 1'b1);
  assign push_idx = $bits(push_idx)'(depth);

  assign full           = (depth == $bits(depth)'(DEPTH));
  assign restrict_valid = (depth != '0);
  always_comb begin
    restrict_max = '0;
    top_ra       = '0;
    if (depth != '0) begin
      restrict_max = ram[top_idx][31:0];
      top_ra       = ram[top_idx][63:32];
    end
  end
  assign state_o = state;

  // detection on the write-back store address
  logic in_range, exempt, hit;
  assign in_range = restrict_valid && (wb_store_addr > restrict_max - 32'd4) && (wb_store_addr <= restrict_max);
  assign exempt   = save_pending && (wb_store_addr == restrict_max);
  assign hit      = wb_store_valid && in_range && !exempt;

  logic        blocked;
  logic [$clog2(STALL_CYCLES+1)-1:0] stall_cnt;
  assign attack     = hit;
  assign store_kill = wb_store_valid && (hit || blocked);
  assign stall      = hit || (stall_cnt != '0);

  always_ff @(posedge clk) begin
    if (state == M_PUSH && !full) ram[push_idx] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= M_IDLE;
      depth        <= '0;
      push_entry   <= '0;
      save_pending <= 1'b0;
      nonrec       <= '0;
      blocked      <= 1'b0;
      stall_cnt    <= '0;
    end else begin
      // blocking sequence
      if (hit) begin
        blocked   <= 1'b1;
        stall_cnt <= $bits(stall_cnt)'(STALL_CYCLES - 1);
      end else if (stall_cnt != '0) begin
        stall_cnt <= stall_cnt - 1'b1;
      end
      if (wb_store_valid && exempt) save_pending <= 1'b0;

      unique case (state)
        M_IDLE, M_BODY: begin
          if (c1) state <= M_CALL;
          else if (c4 && state == M_BODY) state <= M_LOAD;
        end
        M_CALL: begin
          if (c2) begin
            push_entry <= {reg_x1, reg_x2 + imm_s(id_instr)};
            state      <= M_PUSH;
          end else if (c3) begin
            state <= (depth != '0) ? M_BODY : M_IDLE;
          end
        end
        M_PUSH: begin
          if (!full) begin
            depth        <= depth + 1'b1;
            save_pending <= 1'b1;
          end else begin
            nonrec  <= nonrec + 1'b1;
          end
          state <= M_BODY;
        end
        M_LOAD: begin
          if (c5) state <= M_POP;
          else if (c1) state <= M_CALL;
        end
        M_POP: begin
          if (nonrec != '0) nonrec <= nonrec - 1'b1;
          else if (depth != '0) begin
            depth   <= depth - 1'b1;
            blocked <= 1'b0;       // the function that was blocked has returned
          end
          state <= ((depth > 1) || (nonrec != '0)) ? M_BODY : M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule

// siidm: Store Instruction Information Decoding Module of memory protection
// mechanism 2. It measures, in real time, how many bytes of buffer the
// current function segment has written.
//
// Every valid decode-stage instruction is examined. It qualifies when it is
// a store, its immediate is >= 0, and its immediate differs from that of
// the previous store by 0, 1, 2 or 4 (the first store after clear has no
// predecessor and is judged on the sign alone). A qualifying store
// contributes Y_i = 4 (SW), 2 (SH), 1 (SB) or 0 (other funct3) bytes, and
// RT_BS = sum of Y_i since the last clear (a Guard instruction); n_o counts
// the qualifying stores. rt_bs_next is the sum including the store being
// decoded now, so the checker can act before that store executes; rt_bs
// is registered. Stores that do not qualify add nothing and leave the sum.
// The conditions and Y_i follow the document; the handling of the first
// store and of non-qualifying stores is this design's choice.
module siidm
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        id_valid,
  input  logic [31:0] id_instr,
  output logic        store_ok,
  output logic [2:0]  y_i,
  output logic [31:0] rt_bs,
  output logic [31:0] rt_bs_next,
  output logic [15:0] n_o
);
  logic signed [31:0] imm, prev_imm, dimm;
  logic               have_prev, st;

  assign st   = id_valid && is_store(id_instr);
  assign imm  = imm_s(id_instr);
  assign dimm = imm - prev_imm;

  always_comb begin
    store_ok = st && (imm >= 0) &&
               (!have_prev || dimm == 0 || dimm == 1 || dimm == 2 || dimm == 4);
    unique case (funct3(id_instr))
      F3_WORD: y_i = 3'd4;
      F3_HALF: y_i = 3'd2;
      F3_BYTE: y_i = 3'd1;
      default: y_i = 3'd0;
    endcase
    if (!store_ok) y_i = 3'd0;
    rt_bs_next = (clear ? 32'd0 : rt_bs) + 32'(y_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_bs     <= '0;
      prev_imm  <= '0;
      have_prev <= 1'b0;
      n_o       <= '0;
    end else if (clear) begin
      rt_bs     <= '0;
      have_prev <= 1'b0;
      n_o       <= '0;
    end else begin
      rt_bs <= rt_bs_next;
      if (st) begin
        prev_imm  <= imm;
        have_prev <= 1'b1;
      end
      if (store_ok) n_o <= n_o + 1'b1;
    end
  end
endmodule

// rot_top: RISC-V root of trust with self-protection: secure boot (boot ROM
// integrity, key derivation, authentication of user code and data) and two
// hardware memory-protection mechanisms around the processor. The processor
// itself is outside this module; its boot-ROM fetch port, TCM port, decode
// and write-back trace and its stall / store-kill inputs are ports here.
//
// Boot sequence:
//  1. Out of reset boot_verify hashes the whole boot ROM with SM3 and
//     compares the digest with the security register value boot_ref_hash.
//     Only on a match does fetch_en rise (the processor pipeline starts);
//     on a mismatch boot_fail rises and the processor never runs.
//  2. When the pipeline starts, the key derivation circuit runs once
//     (again on each kdf_start pulse): key = SM3(RO-PUF ID xor RO-TRNG).
//  3. Boot code loads the user instructions and data into ITCM and DTCM
//     (port A of each) and pulses uv_start with the host's encrypted digests.
//     user_verify decrypts them with AES-CTR under the derived key, hashes
//     the loaded images and compares. On a mismatch uv_halt stops the
//     processor (fetch_en falls) for good.
// Run time protection:
//  - mp1_ret_guard (mechanism 1) follows calls and returns on the decode
//    trace and flags write-back stores onto the saved return address.
//  - guard_decode + siidm + hbcb (mechanism 2) take the buffer size from the
//    custom Guard instruction and flag stores that exceed it, already at
//    decode.
//  Either mechanism raises core_stall for a few cycles and store_kill for
//  the offending and the following stores of the function concerned.
// While the boot check runs, the ROM port belongs to the checker; after
// that the processor's core_rom_addr drives it (one-cycle read latency).
// kdf_key is brought out for the provisioning host that must encrypt the
// reference digests with the same key; a product would keep it inside.
// Default sizes: 512-word boot ROM, 32 KiB ITCM and DTCM, 96-bit PUF and
// TRNG words, 32-entry shadow stack.
module rot_top #(
  parameter int unsigned ROM_WORDS    = 512,
  parameter int unsigned ITCM_WORDS   = 8192,
  parameter int unsigned DTCM_WORDS   = 8192,
  parameter int unsigned NBITS        = 96,
  parameter int unsigned PUF_WINDOW   = 64,
  parameter int unsigned TRNG_DIV     = 8,
  parameter int unsigned DEVICE_SEED  = 32'h1234_5678,
  parameter int unsigned SS_DEPTH     = 32,
  parameter int unsigned STALL_CYCLES = 2,
  localparam int unsigned RAW = $clog2(ROM_WORDS),
  localparam int unsigned IAW = $clog2(ITCM_WORDS),
  localparam int unsigned DAW = $clog2(DTCM_WORDS),
  localparam int unsigned UAW = (IAW > DAW) ? IAW : DAW
) (
  input  logic             clk,
  input  logic             rst_n,
  // secure boot of the boot ROM
  input  logic [255:0]     boot_ref_hash,
  input  logic [RAW-1:0]   core_rom_addr,
  output logic [31:0]      core_rom_rdata,
  output logic             boot_done,
  output logic             boot_fail,
  output logic [255:0]     boot_hash,
  output logic             fetch_en,
  // key derivation
  input  logic             kdf_start,
  output logic             kdf_busy,
  output logic             kdf_key_valid,
  output logic [255:0]     kdf_key,
  output logic [NBITS-1:0] puf_id,
  // instruction and data TCMs, processor / loader port
  input  logic             itcm_en,
  input  logic [3:0]       itcm_we,
  input  logic [IAW-1:0]   itcm_addr,
  input  logic [31:0]      itcm_wdata,
  output logic [31:0]      itcm_rdata,
  input  logic             dtcm_en,
  input  logic [3:0]       dtcm_we,
  input  logic [DAW-1:0]   dtcm_addr,
  input  logic [31:0]      dtcm_wdata,
  output logic [31:0]      dtcm_rdata,
  // authentication of user instructions and data
  input  logic             uv_start,
  input  logic [127:0]     uv_ctr0,
  input  logic [255:0]     uv_enc_itcm,
  input  logic [255:0]     uv_enc_dtcm,
  input  logic [UAW:0]     uv_itcm_words,
  input  logic [UAW:0]     uv_dtcm_words,
  output logic             uv_busy,
  output logic             uv_done,
  output logic             uv_pass,
  output logic             uv_halt,
  // processor trace for the memory protection
  input  logic             id_valid,
  input  logic [31:0]      id_instr,
  input  logic [31:0]      reg_x1,
  input  logic [31:0]      reg_x2,
  input  logic             wb_store_valid,
  input  logic [31:0]      wb_store_addr,
  output logic             core_stall,
  output logic             store_kill,
  output logic             mp1_attack,
  output logic             mp2_attack,
  output logic [31:0]      guard_ref_bs,
  output logic [31:0]      guard_rt_bs
);
  // ---------------- boot ROM and its integrity check ----------------
  logic [RAW-1:0] rom_addr, chk_addr;
  logic [31:0]    rom_rdata;
  logic           chk_busy, pipeline_en;

  boot_rom #(.WORDS(ROM_WORDS)) u_rom (.clk, .addr(rom_addr), .rdata(rom_rdata));

  boot_verify #(.ROM_WORDS(ROM_WORDS)) u_boot (
    .clk, .rst_n, .ref_hash(boot_ref_hash), .rom_addr(chk_addr), .rom_rdata(rom_rdata),
    .busy(chk_busy), .done(boot_done), .pipeline_en, .boot_fail, .hash_o(boot_hash));

  assign rom_addr       = chk_busy ? chk_addr : core_rom_addr;
  assign core_rom_rdata = rom_rdata;

  // ---------------- key derivation ----------------
  logic pipeline_en_q, kdf_go;
  logic [NBITS-1:0] trng_val, xor_val;
  logic [2:0] kdf_state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipeline_en_q <= 1'b0;
    else        pipeline_en_q <= pipeline_en;
  end
  assign kdf_go = (pipeline_en && !pipeline_en_q) || (kdf_start && pipeline_en);

  kdf #(.NBITS(NBITS), .PUF_WINDOW(PUF_WINDOW), .TRNG_DIV(TRNG_DIV), .DEVICE_SEED(DEVICE_SEED)) u_kdf (
    .clk, .rst_n, .start(kdf_go), .key_o(kdf_key), .key_valid(kdf_key_valid), .busy(kdf_busy),
    .puf_id_o(puf_id), .trng_o(trng_val), .xor_o(xor_val), .state_o(kdf_state));

  // ---------------- TCMs and user image authentication ----------------
  logic           uv_sel;
  logic [UAW-1:0] uv_addr;
  logic [31:0]    itcm_b, dtcm_b, uv_rdata;
  logic           uv_sel_q;
  logic           itcm_ok, dtcm_ok;
  logic [255:0]   hv_i, hv_d, hr_i, hr_d;

  tcm_ram #(.WORDS(ITCM_WORDS)) u_itcm (
    .clk, .a_en(itcm_en), .a_we(itcm_we), .a_addr(itcm_addr), .a_wdata(itcm_wdata), .a_rdata(itcm_rdata),
    .b_addr(uv_addr[IAW-1:0]), .b_rdata(itcm_b));
  tcm_ram #(.WORDS(DTCM_WORDS)) u_dtcm (
    .clk, .a_en(dtcm_en), .a_we(dtcm_we), .a_addr(dtcm_addr), .a_wdata(dtcm_wdata), .a_rdata(dtcm_rdata),
    .b_addr(uv_addr[DAW-1:0]), .b_rdata(dtcm_b));

  always_ff @(posedge clk) uv_sel_q <= uv_sel;
  assign uv_rdata = uv_sel_q ? dtcm_b : itcm_b;

  user_verify #(.ITCM_WORDS(ITCM_WORDS), .DTCM_WORDS(DTCM_WORDS)) u_uv (
    .clk, .rst_n, .start(uv_start), .key(kdf_key), .ctr0(uv_ctr0),
    .enc_itcm(uv_enc_itcm), .enc_dtcm(uv_enc_dtcm),
    .itcm_words(uv_itcm_words), .dtcm_words(uv_dtcm_words),
    .mem_sel(uv_sel), .mem_addr(uv_addr), .mem_rdata(uv_rdata),
    .busy(uv_busy), .done(uv_done), .pass(uv_pass), .halt(uv_halt),
    .itcm_ok, .dtcm_ok, .hash_value_itcm(hv_i), .hash_value_dtcm(hv_d),
    .hash_run_itcm(hr_i), .hash_run_dtcm(hr_d));

  assign fetch_en = pipeline_en && !uv_halt;

  // ---------------- memory protection mechanism 1 ----------------
  logic mp1_stall, mp1_kill, mp1_rvalid, mp1_full;
  logic [31:0] mp1_rmax, mp1_ra;
  logic [$clog2(SS_DEPTH+1)-1:0] mp1_depth;
  logic [2:0] mp1_state;

  mp1_ret_guard #(.DEPTH(SS_DEPTH), .STALL_CYCLES(STALL_CYCLES)) u_mp1 (
    .clk, .rst_n, .id_valid, .id_instr, .reg_x1, .reg_x2, .wb_store_valid, .wb_store_addr,
    .attack(mp1_attack), .stall(mp1_stall), .store_kill(mp1_kill), .restrict_valid(mp1_rvalid),
    .restrict_max(mp1_rmax), .top_ra(mp1_ra), .depth(mp1_depth), .full(mp1_full), .state_o(mp1_state));

  // ---------------- memory protection mechanism 2 ----------------
  logic        guard_hit, st_ok, mp2_armed, mp2_stall, mp2_block;
  logic [2:0]  y_i;
  logic [31:0] rt_next;
  logic [15:0] st_n;

  guard_decode u_guard (.clk, .rst_n, .id_valid, .id_instr, .guard_hit, .ref_bs(guard_ref_bs));
  siidm u_siidm (
    .clk, .rst_n, .clear(guard_hit), .id_valid, .id_instr, .store_ok(st_ok), .y_i,
    .rt_bs(guard_rt_bs), .rt_bs_next(rt_next), .n_o(st_n));
  hbcb #(.STALL_CYCLES(STALL_CYCLES)) u_hbcb (
    .clk, .rst_n, .guard_hit, .id_valid, .id_instr, .ref_bs(guard_ref_bs), .rt_bs_next(rt_next),
    .armed(mp2_armed), .attack(mp2_attack), .stall(mp2_stall), .store_block(mp2_block));

  assign core_stall = mp1_stall || mp2_stall;
  assign store_kill = mp1_kill || (wb_store_valid && mp2_block);
endmodule

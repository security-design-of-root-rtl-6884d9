// boot_verify: Boot ROM secure-start circuit. It keeps the processor pipeline
// off until the boot code has been proven unmodified.
//
// After reset the controller reads the boot ROM word by word and streams the
// words into its SM3 engine, which works through them in 512-bit groups, 64
// compression rounds per group. The last word is flagged together with its
// byte-valid code 2'b11 (all four bytes). When the digest is ready it is
// compared with the reference hash held in the security register
// (ref_hash); on a match pipeline_en rises and stays high, otherwise
// boot_fail rises and the processor never starts. done marks that the check
// is over; hash_o shows the computed digest. ROM reads are registered, so a
// word costs two cycles to read and hand over; the 64-cycle compressions
// dominate: 512 words (32 groups plus a padding group) take
// 32*(16*2+64) + (16+65) + 2 = 3155 clocks from reset release to done.
// rom_addr drives the ROM only while the check runs (busy); afterwards the
// processor owns the ROM port. Control items a)-d) of the document (run
// control, 512-bit grouping, last-word marking, comparison and start signal)
// are all here; the sequencing details are this design's choice.
module boot_verify #(
  parameter int unsigned ROM_WORDS = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [255:0]                 ref_hash,
  output logic [$clog2(ROM_WORDS)-1:0] rom_addr,
  input  logic [31:0]                  rom_rdata,
  output logic                         busy,
  output logic                         done,
  output logic                         pipeline_en,
  output logic                         boot_fail,
  output logic [255:0]                 hash_o
);
  typedef enum logic [2:0] {B_READ, B_FEED, B_WAIT, B_DONE} bstate_t;
  bstate_t state;
  logic [$clog2(ROM_WORDS)-1:0] idx;
  logic sm3_ready, sm3_done, last;
  logic [255:0] digest;

  assign last = (idx == $bits(idx)'(ROM_WORDS - 1));

  sm3_core u_sm3 (
    .clk, .rst_n, .in_valid(state == B_FEED), .in_ready(sm3_ready), .in_data(rom_rdata),
    .in_last(last), .in_vbytes(2'b11), .hash_o(digest), .hash_valid(sm3_done));

  assign rom_addr = idx;
  assign busy     = (state != B_DONE);
  assign done     = (state == B_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= B_READ;
      idx         <= '0;
      pipeline_en <= 1'b0;
      boot_fail   <= 1'b0;
      hash_o      <= '0;
    end else begin
      unique case (state)
        B_READ: state <= B_FEED;               // ROM data valid next cycle
        B_FEED: if (sm3_ready) begin
          if (last) state <= B_WAIT;
          else begin
            idx   <= idx + 1'b1;
            state <= B_READ;
          end
        end
        B_WAIT: if (sm3_done) begin
          hash_o      <= digest;
          pipeline_en <= (digest == ref_hash);
          boot_fail   <= (digest != ref_hash);
          state       <= B_DONE;
        end
        B_DONE: ;
        default: state <= B_DONE;
      endcase
    end
  end
endmodule

// Chunk sequence accelerator ("for-loop accelerator") in registers 16..31
// of the processor's register file.
//
// It replays a sequence of up to N_ENTRIES chunk functions, each repeated
// an inner number of times, and the whole sequence an outer number of times,
// so that the program reaches the next chunk with one jump instead of loop
// code. Register use (as in the design):
//   16..20  addressed shift register (ASR): one entry per chunk, bits 15:0 =
//           low half of the chunk function address, bits 31:16 = inner count
//   27      start address of the command program     (plain register)
//   28      loop return address                      (plain register)
//   29      shift ring counters, read only: SRC A in bits 4:0, SRC B in 20:16
//   30      copy of register 16 as last loaded, read only
//   31      bits 31:16 = high half of every chunk address, 15:0 = outer count
//   21..26  unused, read as zero
// The shift ring counters are thermometer codes: shift left to count up,
// right to count down. Each write to an ASR register (the modified addi)
// counts both up. SRC B is the number of entries in the ring, SRC A the
// entries still to visit in the current pass.
//
// A jump request (fjr, or a push instruction with c_end) while the ring is
// not empty returns target_o = {r31[31:16], r16[15:0]} and then:
//   - if the inner count of register 16 is not zero, decrements it;
//   - otherwise the entry is used up: the ASR shifts down by one and SRC A
//     counts down. If the outer count is not zero the entry's original value
//     (register 30) is put back at the end of the ring (circular shift);
//     otherwise the ring shrinks (SRC B counts down). When SRC A reaches zero
//     with the outer count not zero, the outer count is decremented and a new
//     pass starts (SRC A = SRC B).
// So an entry with inner count n runs n+1 times per pass and the sequence
// runs outer+1 times; the jump into the very last run empties the ring, and
// the jump request at the end of that run finds it empty (active_o low) and
// is skipped by the pipeline. Counting "n more times" after the first is this
// implementation's reading of "decremented if it is not 0"; the placement of
// the counters' bits in register 29 and the outer-pass rule are its own.
//
// Ports: one write port with priority (we_i/waddr_i/wdata_i, the register
// file's normal write path), a second write port for register 28 only
// (ret_we_i, used by fjr in the command pipeline), one asynchronous read
// port. A write and a jump in the same cycle: the write wins.
module chunk_seq_acc
  import ctrl_seq_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 5
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        we_i,
  input  logic [4:0]  waddr_i,
  input  logic [31:0] wdata_i,
  input  logic        ret_we_i,
  input  logic [31:0] ret_wdata_i,
  input  logic [4:0]  raddr_i,
  output logic [31:0] rdata_o,
  input  logic        jump_i,
  output logic        active_o,
  output logic [31:0] target_o,
  output logic [31:0] start_addr_o,
  output logic [31:0] ret_addr_o
);
  localparam int unsigned NW = $clog2(N_ENTRIES);

  logic [31:0]          asr_q [N_ENTRIES];
  logic [31:0]          copy_q, start_q, ret_q, outer_q;
  logic [N_ENTRIES-1:0] srca_q, srcb_q;

  logic [31:0]          asr_d [N_ENTRIES];
  logic [31:0]          copy_d, outer_d;
  logic [N_ENTRIES-1:0] srca_d, srcb_d;
  logic                 is_asr_wr;
  logic [NW-1:0]        tail;

  assign active_o     = srcb_q[0];
  assign target_o     = {outer_q[31:16], asr_q[0][15:0]};
  assign start_addr_o = start_q;
  assign ret_addr_o   = ret_q;
  assign is_asr_wr    = we_i && (waddr_i >= RF_ASR0) && (waddr_i < RF_ASR0 + 5'(N_ENTRIES));

  // Index of the last entry of the ring (highest set bit of SRC B).
  always_comb begin
    tail = '0;
    for (int i = 0; i < N_ENTRIES; i++)
      if (srcb_q[i]) tail = NW'(i);
  end

  always_comb begin
    for (int i = 0; i < N_ENTRIES; i++) asr_d[i] = asr_q[i];
    copy_d  = copy_q;
    outer_d = outer_q;
    srca_d  = srca_q;
    srcb_d  = srcb_q;
    if (is_asr_wr) begin
      asr_d[NW'(waddr_i - RF_ASR0)] = wdata_i;
      if (waddr_i == RF_ASR0) copy_d = wdata_i;
      srca_d = {srca_q[N_ENTRIES-2:0], 1'b1};
      srcb_d = {srcb_q[N_ENTRIES-2:0], 1'b1};
    end else if (jump_i && active_o) begin
      if (asr_q[0][31:16] != '0) begin
        asr_d[0][31:16] = asr_q[0][31:16] - 16'd1;
      end else begin
        for (int i = 0; i < N_ENTRIES - 1; i++) asr_d[i] = asr_q[i + 1];
        asr_d[N_ENTRIES-1] = '0;
        srca_d = srca_q >> 1;
        if (outer_q[15:0] != '0) begin
          asr_d[tail] = copy_q;               // circular shift
          if (srca_q[1] == 1'b0) begin        // pass complete
            outer_d[15:0] = outer_q[15:0] - 16'd1;
            srca_d        = srcb_q;
          end
        end else begin
          asr_d[tail] = '0;
          srcb_d      = srcb_q >> 1;          // ring shrinks
        end
        copy_d = asr_d[0];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < N_ENTRIES; i++) asr_q[i] <= '0;
      copy_q  <= '0;
      start_q <= '0;
      ret_q   <= '0;
      outer_q <= '0;
      srca_q  <= '0;
      srcb_q  <= '0;
    end else begin
      for (int i = 0; i < N_ENTRIES; i++) asr_q[i] <= asr_d[i];
      copy_q <= copy_d;
      outer_q <= outer_d;
      srca_q <= srca_d;
      srcb_q <= srcb_d;
      if (we_i && waddr_i == RF_OUTER) outer_q <= wdata_i;
      if (we_i && waddr_i == RF_START) start_q <= wdata_i;
      if (we_i && waddr_i == RF_RET)   ret_q   <= wdata_i;
      else if (ret_we_i)               ret_q   <= ret_wdata_i;
    end
  end

  always_comb begin
    rdata_o = '0;
    if (raddr_i >= RF_ASR0 && raddr_i < RF_ASR0 + 5'(N_ENTRIES)) rdata_o = asr_q[NW'(raddr_i - RF_ASR0)];
    else if (raddr_i == RF_START) rdata_o = start_q;
    else if (raddr_i == RF_RET)   rdata_o = ret_q;
    else if (raddr_i == RF_SRC)   rdata_o = {11'b0, 5'(srcb_q), 11'b0, 5'(srca_q)};
    else if (raddr_i == RF_COPY)  rdata_o = copy_q;
    else if (raddr_i == RF_OUTER) rdata_o = outer_q;
  end
endmodule

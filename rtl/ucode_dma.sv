// Microcode DMA: reads microcode chunks from memory and pushes them, one
// 32-bit control word per cycle, to the radar command interface.
//
// The start address of each chunk comes from the chunk FIFO. Words are read
// over a TCDM master port in bursts of BURST_LEN (eight) reads, following the
// four-state chart of the design: Idle, Init burst, In burst, Finish burst.
//   Idle        waits until the DMA is enabled, the FIFO holds an address and
//               the radar requests commands (cmd_req_i); then pops the FIFO.
//   Init burst  issues the first read of a burst; nothing is pushed because
//               the memory answers one cycle later.
//   In burst    pushes the word read in the previous cycle and issues the
//               next read, until a word with c_end is pushed (chunk done) or
//               BURST_LEN reads have been issued.
//   Finish      pushes the last word of the burst; then starts a new burst
//               of the same chunk, or a new chunk if that word had c_end.
// When a chunk ends and more commands are wanted with the FIFO not empty, the
// next chunk starts at once from Init burst; otherwise the DMA goes Idle.
// A burst of eight words therefore takes nine cycles (0.89 words/cycle).
//
// Two counters are kept: the reads issued in the burst (step 1) and the read
// address (step 4). Own choices where the description is silent: a read is
// issued only while cmd_req_i is high (words already requested are still
// pushed after it falls, so the consumer must absorb up to one more word);
// the read issued in the cycle a c_end word arrives is suppressed, so no
// word beyond a chunk is read; a request that is not granted is held with
// the same address until granted (TCDM rule), which stalls the burst.
module ucode_dma
  import ctrl_seq_pkg::*;
#(
  parameter int unsigned BURST_LEN = 8
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        enable_i,      // control register bit 0
  // chunk FIFO
  input  logic        fifo_empty_i,
  input  logic [31:0] fifo_addr_i,
  output logic        fifo_pop_o,
  // TCDM master (read only)
  output tcdm_req_t   tcdm_req_o,
  input  logic        tcdm_gnt_i,
  input  logic        tcdm_rvalid_i,
  input  logic [31:0] tcdm_rdata_i,
  // radar command interface
  input  logic        cmd_req_i,
  output logic [31:0] cmd_o,
  output logic        cmd_valid_o,
  output logic        busy_o
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_IN_BURST, S_FINISH} state_e;
  localparam int unsigned CW = $clog2(BURST_LEN + 1);

  state_e      state_q, state_d;
  logic [31:0] addr_q, addr_d;
  logic [CW-1:0] cnt_q, cnt_d;
  logic        hold_q;             // request issued but not yet granted

  logic   rx, rx_cend, issue, granted, next_chunk;
  ucode_t rx_word;

  assign rx      = tcdm_rvalid_i && (state_q inside {S_IN_BURST, S_FINISH});
  assign rx_word = ucode_t'(tcdm_rdata_i);
  assign rx_cend = rx && rx_word.c_end;
  assign next_chunk = enable_i && cmd_req_i && !fifo_empty_i;

  // A read is issued in Init burst, and in In burst unless the chunk ends.
  assign issue = (cmd_req_i || hold_q) &&
                 ((state_q == S_INIT) || (state_q == S_IN_BURST && !rx_cend));

  always_comb begin
    state_d    = state_q;
    addr_d     = addr_q;
    cnt_d      = cnt_q;
    fifo_pop_o = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (next_chunk) begin
          fifo_pop_o = 1'b1;
          addr_d     = fifo_addr_i;
          cnt_d      = '0;
          state_d    = S_INIT;
        end
      end
      S_INIT: begin
        if (issue && tcdm_gnt_i) begin
          addr_d  = addr_q + 32'd4;
          cnt_d   = CW'(1);
          state_d = (BURST_LEN == 1) ? S_FINISH : S_IN_BURST;
        end
      end
      S_IN_BURST: begin
        if (rx_cend) begin
          if (next_chunk) begin
            fifo_pop_o = 1'b1;
            addr_d     = fifo_addr_i;
            cnt_d      = '0;
            state_d    = S_INIT;
          end else begin
            state_d = S_IDLE;
          end
        end else begin
          if (issue && tcdm_gnt_i) begin
            addr_d = addr_q + 32'd4;
            cnt_d  = cnt_q + 1'b1;
            if (cnt_q == CW'(BURST_LEN - 1)) state_d = S_FINISH;
          end
        end
      end
      S_FINISH: begin
        if (rx) begin
          cnt_d = '0;
          if (rx_word.c_end) begin
            if (next_chunk) begin
              fifo_pop_o = 1'b1;
              addr_d     = fifo_addr_i;
              state_d    = S_INIT;
            end else begin
              state_d = S_IDLE;
            end
          end else begin
            state_d = S_INIT;
          end
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign granted = issue && tcdm_gnt_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      cnt_q   <= '0;
      hold_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      addr_q  <= addr_d;
      cnt_q   <= cnt_d;
      hold_q  <= issue && !tcdm_gnt_i;
    end
  end

  always_comb begin
    tcdm_req_o       = '0;
    tcdm_req_o.req   = issue;
    tcdm_req_o.addr  = addr_q;
    tcdm_req_o.be    = 4'hF;
  end

  assign cmd_o       = rx ? tcdm_rdata_i : '0;
  assign cmd_valid_o = rx;
  assign busy_o      = (state_q != S_IDLE);

  // TCDM rule: a request that was not granted stays up with the same address.
  a_req_held: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (tcdm_req_o.req && !tcdm_gnt_i) |=> (tcdm_req_o.req && $stable(tcdm_req_o.addr)));
  // At most one read is outstanding, so data never arrives in Idle or Init.
  a_no_stray_data: assert property (@(posedge clk_i) disable iff (!rst_ni)
    granted |=> tcdm_rvalid_i);
endmodule

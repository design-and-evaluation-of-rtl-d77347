// Microcode control system for a pulse-coherent radar SoC: two ways of
// feeding the radar's command interface with 32-bit microcode words, side
// by side, each with its own radar port.
//
// DMA side (dma_*): the CPU precomputes the microcode chunks into a
// dedicated 8 KB memory and queues chunk start addresses into the wrapper's
// chunk FIFO over APB; the wrapper's DMA reads the chunks in bursts of eight
// words through a round-robin interconnect (masters: CPU, DMA, debug port)
// and pushes them, with their 48-bit decompressed form, to the radar. When
// the CPU port uses the memory in the same cycle as the DMA, the DMA is not
// granted and its stream pauses.
//
// Command-pipeline side (cp_*): a second instruction pipeline next to the
// main processor runs a program of push instructions from its own 8 KB
// instruction memory (masters: main CPU for loading, command pipeline),
// uses the chunk sequence accelerator to jump from chunk to chunk, and
// pushes the words through a wrapper that only decompresses. The main
// pipeline itself is outside this block: its decoded start_p and synch_p,
// its CSR accesses, its write/read access to registers 16..31 and its
// interrupt state are ports; the command pipeline's CSR (0x800: idle status,
// stall control) and the synchronization module between the two pipelines
// are here.
//
// All ports are plain signals or packed structs from ctrl_seq_pkg; TCDM
// ports follow the req/gnt, rvalid-one-cycle-later protocol; APB ports are
// completers that never wait. One clock, one active-low asynchronous reset.
// The two sides are the design's dedicated-memory DMA arrangement and its
// command-pipeline arrangement; putting both in one top with separate radar
// ports, and the 8 KB size of the command memory, are this implementation's
// choices.
module ctrl_seq_top
  import ctrl_seq_pkg::*;
#(
  parameter int unsigned UCODE_WORDS = 2048,  // 8 KB microcode memory
  parameter int unsigned IMEM_WORDS  = 2048   // 8 KB command instruction memory
) (
  input  logic             clk_i,
  input  logic             rst_ni,

  // ------------------------------------------------------------ DMA side
  input  logic             dma_psel_i,
  input  logic             dma_penable_i,
  input  logic             dma_pwrite_i,
  input  logic [31:0]      dma_paddr_i,
  input  logic [31:0]      dma_pwdata_i,
  output logic [31:0]      dma_prdata_o,
  output logic             dma_pready_o,
  input  tcdm_req_t        cpu_req_i,      // CPU data port to microcode memory
  output logic             cpu_gnt_o,
  output logic             cpu_rvalid_o,
  output logic [31:0]      cpu_rdata_o,
  input  tcdm_req_t        jtag_req_i,     // debug port to microcode memory
  output logic             jtag_gnt_o,
  output logic             jtag_rvalid_o,
  output logic [31:0]      jtag_rdata_o,
  input  logic             dma_cmd_req_i,
  output logic [31:0]      dma_cmd_o,
  output logic [DEC_W-1:0] dma_dec_cmd_o,
  output logic             dma_cmd_valid_o,
  output logic             dma_busy_o,

  // ------------------------------------------------ command-pipeline side
  input  logic             cp_psel_i,
  input  logic             cp_penable_i,
  input  logic             cp_pwrite_i,
  input  logic [31:0]      cp_paddr_i,
  input  logic [31:0]      cp_pwdata_i,
  output logic [31:0]      cp_prdata_o,
  output logic             cp_pready_o,
  input  tcdm_req_t        main_imem_req_i, // main CPU port to command memory
  output logic             main_imem_gnt_o,
  output logic             main_imem_rvalid_o,
  output logic [31:0]      main_imem_rdata_o,
  input  logic             start_p_i,
  input  logic             csr_we_i,        // main core CSR write (new value)
  input  logic [11:0]      csr_addr_i,
  input  logic [31:0]      csr_wdata_i,
  output logic [31:0]      csr_rdata_o,
  output logic             csr_hit_o,       // address is the command-pipeline CSR
  output logic             pipe_idle_o,
  input  logic             rf_we_i,
  input  logic [4:0]       rf_waddr_i,
  input  logic [31:0]      rf_wdata_i,
  input  logic [4:0]       rf_raddr_i,
  output logic [31:0]      rf_rdata_o,
  input  logic             main_sync_issued_i,
  input  logic [4:0]       main_sync_id_i,
  input  logic             pending_irq_i,
  input  logic             irq_done_i,
  output logic             main_pipe_lock_o,
  input  logic             cp_cmd_req_i,
  output logic [31:0]      cp_cmd_o,
  output logic [DEC_W-1:0] cp_dec_cmd_o,
  output logic             cp_cmd_valid_o,
  output logic             cp_jump_o,
  output cp_state_e        cp_state_o
);
  // =============================================================== DMA side
  tcdm_req_t   dma_req;
  tcdm_req_t   ux_m_req [3];
  logic [2:0]  ux_m_gnt, ux_m_rvalid;
  logic [31:0] ux_m_rdata;
  tcdm_req_t   ux_s_req;
  logic        ux_s_gnt, ux_s_rvalid;
  logic [31:0] ux_s_rdata;

  acc_wrapper #(.HAS_DMA(1'b1)) u_dma_wrapper (
    .clk_i, .rst_ni,
    .psel_i          (dma_psel_i),
    .penable_i       (dma_penable_i),
    .pwrite_i        (dma_pwrite_i),
    .paddr_i         (dma_paddr_i),
    .pwdata_i        (dma_pwdata_i),
    .prdata_o        (dma_prdata_o),
    .pready_o        (dma_pready_o),
    .tcdm_req_o      (dma_req),
    .tcdm_gnt_i      (ux_m_gnt[1]),
    .tcdm_rvalid_i   (ux_m_rvalid[1]),
    .tcdm_rdata_i    (ux_m_rdata),
    .cpu_cmd_i       ('0),
    .cpu_cmd_valid_i (1'b0),
    .cmd_req_i       (dma_cmd_req_i),
    .cmd_o           (dma_cmd_o),
    .dec_cmd_o       (dma_dec_cmd_o),
    .cmd_valid_o     (dma_cmd_valid_o),
    .dma_busy_o      (dma_busy_o)
  );

  assign ux_m_req[0] = cpu_req_i;
  assign ux_m_req[1] = dma_req;
  assign ux_m_req[2] = jtag_req_i;
  assign cpu_gnt_o     = ux_m_gnt[0];
  assign cpu_rvalid_o  = ux_m_rvalid[0];
  assign cpu_rdata_o   = ux_m_rdata;
  assign jtag_gnt_o    = ux_m_gnt[2];
  assign jtag_rvalid_o = ux_m_rvalid[2];
  assign jtag_rdata_o  = ux_m_rdata;

  tcdm_rr_xbar #(.N_MASTERS(3)) u_ucode_xbar (
    .clk_i, .rst_ni,
    .m_req_i    (ux_m_req),
    .m_gnt_o    (ux_m_gnt),
    .m_rvalid_o (ux_m_rvalid),
    .m_rdata_o  (ux_m_rdata),
    .s_req_o    (ux_s_req),
    .s_gnt_i    (ux_s_gnt),
    .s_rvalid_i (ux_s_rvalid),
    .s_rdata_i  (ux_s_rdata)
  );

  tcdm_sram #(.WORDS(UCODE_WORDS)) u_ucode_mem (
    .clk_i, .rst_ni,
    .req_i    (ux_s_req),
    .gnt_o    (ux_s_gnt),
    .rvalid_o (ux_s_rvalid),
    .rdata_o  (ux_s_rdata)
  );

  // ================================================== command-pipeline side
  tcdm_req_t   if_req;
  tcdm_req_t   ix_m_req [2];
  logic [1:0]  ix_m_gnt, ix_m_rvalid;
  logic [31:0] ix_m_rdata;
  tcdm_req_t   ix_s_req;
  logic        ix_s_gnt, ix_s_rvalid;
  logic [31:0] ix_s_rdata;
  tcdm_req_t   cp_wrap_req_unused;
  logic        cmd_lock, cp_sync_issued, cp_busy_unused;
  logic [4:0]  cp_sync_id;
  logic [31:0] cp_raw_cmd;
  logic        cp_raw_valid;

  logic csr_stall;

  cmdp_csr u_cmdp_csr (
    .clk_i, .rst_ni,
    .csr_we_i, .csr_addr_i, .csr_wdata_i, .csr_rdata_o, .csr_hit_o,
    .pipe_idle_i (pipe_idle_o),
    .stall_o     (csr_stall)
  );

  cmd_pipeline u_cmd_pipe (
    .clk_i, .rst_ni,
    .start_i       (start_p_i),
    .csr_stall_i   (csr_stall),
    .pipe_idle_o,
    .rf_we_i, .rf_waddr_i, .rf_wdata_i, .rf_raddr_i, .rf_rdata_o,
    .lock_i        (cmd_lock),
    .sync_issued_o (cp_sync_issued),
    .sync_id_o     (cp_sync_id),
    .imem_req_o    (if_req),
    .imem_rvalid_i (ix_m_rvalid[1]),
    .imem_rdata_i  (ix_m_rdata),
    .cmd_req_i     (cp_cmd_req_i),
    .cmd_o         (cp_raw_cmd),
    .cmd_valid_o   (cp_raw_valid),
    .jump_o        (cp_jump_o),
    .state_o       (cp_state_o)
  );

  sync_lock u_sync (
    .clk_i, .rst_ni,
    .cmd_lock_issued_i  (cp_sync_issued),
    .cmd_lock_id_i      (cp_sync_id),
    .main_lock_issued_i (main_sync_issued_i),
    .main_lock_id_i     (main_sync_id_i),
    .pending_irq_i,
    .irq_done_i,
    .cmd_pipe_lock_o    (cmd_lock),
    .main_pipe_lock_o
  );

  assign ix_m_req[0]     = main_imem_req_i;
  assign ix_m_req[1]     = if_req;
  assign main_imem_gnt_o    = ix_m_gnt[0];
  assign main_imem_rvalid_o = ix_m_rvalid[0];
  assign main_imem_rdata_o  = ix_m_rdata;

  tcdm_rr_xbar #(.N_MASTERS(2)) u_imem_xbar (
    .clk_i, .rst_ni,
    .m_req_i    (ix_m_req),
    .m_gnt_o    (ix_m_gnt),
    .m_rvalid_o (ix_m_rvalid),
    .m_rdata_o  (ix_m_rdata),
    .s_req_o    (ix_s_req),
    .s_gnt_i    (ix_s_gnt),
    .s_rvalid_i (ix_s_rvalid),
    .s_rdata_i  (ix_s_rdata)
  );

  tcdm_sram #(.WORDS(IMEM_WORDS)) u_cmd_imem (
    .clk_i, .rst_ni,
    .req_i    (ix_s_req),
    .gnt_o    (ix_s_gnt),
    .rvalid_o (ix_s_rvalid),
    .rdata_o  (ix_s_rdata)
  );

  acc_wrapper #(.HAS_DMA(1'b0)) u_cp_wrapper (
    .clk_i, .rst_ni,
    .psel_i          (cp_psel_i),
    .penable_i       (cp_penable_i),
    .pwrite_i        (cp_pwrite_i),
    .paddr_i         (cp_paddr_i),
    .pwdata_i        (cp_pwdata_i),
    .prdata_o        (cp_prdata_o),
    .pready_o        (cp_pready_o),
    .tcdm_req_o      (cp_wrap_req_unused),
    .tcdm_gnt_i      (1'b0),
    .tcdm_rvalid_i   (1'b0),
    .tcdm_rdata_i    ('0),
    .cpu_cmd_i       (cp_raw_cmd),
    .cpu_cmd_valid_i (cp_raw_valid),
    .cmd_req_i       (cp_cmd_req_i),
    .cmd_o           (cp_cmd_o),
    .dec_cmd_o       (cp_dec_cmd_o),
    .cmd_valid_o     (cp_cmd_valid_o),
    .dma_busy_o      (cp_busy_unused)
  );
endmodule

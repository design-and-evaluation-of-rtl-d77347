// Status and control register of the command pipeline, as seen by the main
// processor through its CSR instructions (csrr / csrw / csrs / csrc are
// reduced to a write-enable with the new value, done by the main core).
//
// Address 0x800, two bits:
//   bit 0  pipe_idle, read only: 1 while the command pipeline is in Idle
//          (not executing code)
//   bit 1  stall, read/write: while 1 the command pipeline is held in its
//          Stall state
// Other bits read as zero and ignore writes; other addresses do not hit
// (csr_hit_o low), so the main core can fall back to its own CSRs.
//
// Timing: a write takes effect at the next clock edge, so stall_o rises one
// cycle after the write; reads are combinational. Reset clears the stall
// bit. The address, the two bits and their meaning follow the design (which
// names the address once as 0x801; 0x800 is used); the hit signal and the
// write-with-value interface are this implementation's.
module cmdp_csr
  import ctrl_seq_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        csr_we_i,
  input  logic [11:0] csr_addr_i,
  input  logic [31:0] csr_wdata_i,
  output logic [31:0] csr_rdata_o,
  output logic        csr_hit_o,
  input  logic        pipe_idle_i,
  output logic        stall_o
);
  logic stall_q;

  assign csr_hit_o = (csr_addr_i == CSR_CMDP);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                     stall_q <= 1'b0;
    else if (csr_we_i && csr_hit_o)  stall_q <= csr_wdata_i[1];
  end

  assign stall_o     = stall_q;
  assign csr_rdata_o = csr_hit_o ? {30'd0, stall_q, pipe_idle_i} : '0;
endmodule

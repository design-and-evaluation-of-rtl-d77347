// Single-port 32-bit memory with a TCDM slave port, standing for the 8 KB
// memory macro of the design (WORDS = 2048 words of 32 bits).
//
// Every request is granted in the cycle it is made. A write stores the bytes
// selected by be; a read returns its data with rvalid one cycle later, which
// is the one-cycle read delay the DMA and the command pipeline are built
// around. Writes also raise rvalid one cycle later (acknowledge, rdata 0).
// The address is a byte address; its low two bits and the bits above the
// array are ignored, so the memory aliases within any window it is mapped
// to. Reset clears only the response valid flag; the array is not reset. Written as an array so a synthesis tool can map
// it onto a macro; the macro itself is process specific.
module tcdm_sram
  import ctrl_seq_pkg::*;
#(
  parameter int unsigned WORDS = 2048
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t req_i,
  output logic        gnt_o,
  output logic        rvalid_o,
  output logic [31:0] rdata_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic          rvalid_q;
  logic [31:0]   rdata_q;

  assign widx = req_i.addr[AW+1:2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= req_i.req;
  end

  always_ff @(posedge clk_i) begin
    if (req_i.req) begin
      if (req_i.wen) begin
        for (int b = 0; b < 4; b++)
          if (req_i.be[b]) mem[widx][8*b +: 8] <= req_i.wdata[8*b +: 8];
        rdata_q <= '0;
      end else begin
        rdata_q <= mem[widx];
      end
    end
  end

  assign gnt_o    = req_i.req;
  assign rvalid_o = rvalid_q;
  assign rdata_o  = rdata_q;
endmodule

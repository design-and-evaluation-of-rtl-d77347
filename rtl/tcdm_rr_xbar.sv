// Interconnect from N_MASTERS TCDM masters to one memory.
//
// This is the per-slave part of the SoC's TCDM crossbar: a request network
// that picks one of the requesting masters by round robin and forwards its
// request, and a response network that routes rvalid/rdata back to the
// master that was granted. The design names round-robin arbitration and a
// fixed latency; this implementation adds no register of its own, so a read
// granted in cycle t returns in cycle t+1, as the memory answers.
//
// Round robin: the master after the one granted last has the highest
// priority. A master that is not granted must hold its request (it sees
// gnt low), which is what makes the DMA stall when the CPU uses the same
// memory.
module tcdm_rr_xbar
  import ctrl_seq_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t m_req_i [N_MASTERS],
  output logic [N_MASTERS-1:0] m_gnt_o,
  output logic [N_MASTERS-1:0] m_rvalid_o,
  output logic [31:0]          m_rdata_o,   // shared by all masters
  output tcdm_req_t s_req_o,
  input  logic      s_gnt_i,
  input  logic      s_rvalid_i,
  input  logic [31:0] s_rdata_i
);
  localparam int unsigned IW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1;

  logic [IW-1:0] last_q, sel, resp_q;
  logic          any_req, resp_valid_q;

  // Round-robin pick: first requester after last_q, wrapping around.
  always_comb begin
    sel     = '0;
    any_req = 1'b0;
    for (int k = 1; k <= N_MASTERS; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N_MASTERS;
      if (!any_req && m_req_i[idx].req) begin
        any_req = 1'b1;
        sel     = IW'(idx);
      end
    end
  end

  always_comb begin
    s_req_o     = m_req_i[sel];
    s_req_o.req = any_req;
  end

  always_comb begin
    for (int m = 0; m < N_MASTERS; m++) begin
      m_gnt_o[m]    = any_req && (sel == IW'(m)) && s_gnt_i;
      m_rvalid_o[m] = resp_valid_q && (resp_q == IW'(m)) && s_rvalid_i;
    end
  end
  assign m_rdata_o = s_rdata_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      last_q       <= IW'(N_MASTERS - 1);
      resp_q       <= '0;
      resp_valid_q <= 1'b0;
    end else begin
      resp_valid_q <= any_req && s_gnt_i;
      if (any_req && s_gnt_i) begin
        last_q <= sel;
        resp_q <= sel;
      end
    end
  end
endmodule

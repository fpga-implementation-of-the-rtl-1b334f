// mm_interconnect: memory-mapped interconnect between the bus masters (the
// processor and the SoC estimation block) and the slaves of the system.
// Arbitration is round robin between requesting masters. A master that has been
// granted keeps the grant until its transfer completes (request with waitreq
// low), so a slave with wait states always sees one transfer from start to end.
// A master that is not granted sees waitreq high. The address of the granted
// master is decoded with sopc_pkg::mm_decode; an unmapped address completes at
// once, reads 0 and raises the decode_err pulse. Fully combinational in the
// request path; only the grant state is registered.
// The document uses a vendor-generated interconnect; this one is the simplest
// structure that gives the same connectivity. Assertions check the two bus
// rules listed at the end of the module.
module mm_interconnect
  import sopc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t m_req [N_MASTERS],
  output mm_rsp_t m_rsp [N_MASTERS],
  output mm_req_t s_req [N_SLAVES],
  input  mm_rsp_t s_rsp [N_SLAVES],
  output logic    decode_err
);

  localparam int unsigned MW = $clog2(N_MASTERS);

  logic          locked_q;
  logic [MW-1:0] owner_q, last_q, grant;
  logic          any_req, done;
  slave_e        sel;
  mm_rsp_t       rsp;

  function automatic logic active(input mm_req_t r);
    return r.read | r.write;
  endfunction

  logic [N_MASTERS-1:0] req_vec;
  logic [MW-1:0]        rr_pick;
  logic                 rr_any;

  always_comb begin
    for (int unsigned m = 0; m < N_MASTERS; m++) req_vec[m] = active(m_req[m]);
  end

  // round robin: search from the master after the last one served
  always_comb begin
    rr_any  = 1'b0;
    rr_pick = last_q;
    for (int unsigned k = 1; k <= N_MASTERS; k++) begin
      if (!rr_any && req_vec[(int'(last_q) + k) % N_MASTERS]) begin
        rr_any  = 1'b1;
        rr_pick = MW'((int'(last_q) + k) % N_MASTERS);
      end
    end
  end

  always_comb begin
    if (locked_q) begin
      grant   = owner_q;
      any_req = req_vec[owner_q];
    end else begin
      grant   = rr_pick;
      any_req = rr_any;
    end

    sel = mm_decode(m_req[grant].addr);
  end

  // request path: grant and decode to the selected slave
  always_comb begin
    for (int unsigned s = 0; s < N_SLAVES; s++) begin
      s_req[s] = MM_REQ_IDLE;
      s_req[s].addr  = m_req[grant].addr;
      s_req[s].wdata = m_req[grant].wdata;
      if (any_req && sel == slave_e'(s)) begin
        s_req[s].read  = m_req[grant].read;
        s_req[s].write = m_req[grant].write;
      end
    end
  end

  // response path: selected slave back to the granted master
  always_comb begin
    rsp = '{rdata: 32'd0, waitreq: 1'b0};
    if (sel != SL_NONE) rsp = s_rsp[sel];
    done       = any_req && !rsp.waitreq;
    decode_err = any_req && sel == SL_NONE;
    for (int unsigned m = 0; m < N_MASTERS; m++) begin
      m_rsp[m].rdata   = rsp.rdata;
      m_rsp[m].waitreq = !(any_req && grant == MW'(m) && !rsp.waitreq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      last_q   <= MW'(N_MASTERS - 1);
    end else if (any_req) begin
      if (done) begin
        locked_q <= 1'b0;
        last_q   <= grant;
      end else begin
        locked_q <= 1'b1;
        owner_q  <= grant;
      end
    end
  end

  // Bus rules: at most one master completes a transfer per cycle, and a master
  // that holds the grant keeps its request up until the transfer completes.
  logic [$clog2(N_MASTERS + 1)-1:0] n_done;
  always_comb begin
    n_done = '0;
    for (int unsigned m = 0; m < N_MASTERS; m++) n_done += {{($bits(n_done) - 1){1'b0}}, !m_rsp[m].waitreq};
  end

  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) n_done <= 1)
    else $error("more than one master completed a transfer");
  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n) locked_q |-> req_vec[owner_q])
    else $error("granted master dropped its request before completion");

endmodule

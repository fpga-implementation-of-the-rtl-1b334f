// tb_mm_interconnect: two masters issue random reads and writes at the same
// time to six memory slaves modelled here (each with random wait states) and to
// unmapped addresses. A scoreboard checks that every transfer reaches the slave
// its address decodes to, that reads return what was last written there, that
// only the granted master completes, that both masters get served (round
// robin) and that unmapped accesses complete with decode_err and read 0.
module tb_mm_interconnect;
  import sopc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t m_req [N_MASTERS];
  mm_rsp_t m_rsp [N_MASTERS];
  mm_req_t s_req [N_SLAVES];
  mm_rsp_t s_rsp [N_SLAVES];
  logic decode_err;
  int checks = 0, failures = 0;
  int served [N_MASTERS];
  int contended = 0, derr = 0;

  mm_interconnect dut (.clk(clk), .rst_n(rst_n), .m_req(m_req), .m_rsp(m_rsp),
                       .s_req(s_req), .s_rsp(s_rsp), .decode_err(decode_err));
  always #5 clk = ~clk;

  localparam logic [31:0] BASES [N_SLAVES] = '{BASE_SOCEST, BASE_PARAM, BASE_LUT, BASE_ADC, BASE_UART, BASE_XMEM};

  // slave models: 16 words each, a slave stalls a random number of cycles
  logic [31:0] mem [N_SLAVES][16];
  int          stall [N_SLAVES];
  logic [31:0] ref_mem [N_SLAVES][16];

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_sl
    always_comb begin
      s_rsp[s].waitreq = (s_req[s].read || s_req[s].write) && stall[s] > 0;
      s_rsp[s].rdata   = mem[s][s_req[s].addr[5:2]];
    end
    always @(posedge clk) begin
      if (s_req[s].read || s_req[s].write) begin
        if (stall[s] > 0) stall[s] <= stall[s] - 1;
        else begin
          if (s_req[s].write) mem[s][s_req[s].addr[5:2]] <= s_req[s].wdata;
          stall[s] <= $urandom_range(2, 0);
          // exactly one slave may be active at a time
          for (int o = 0; o < N_SLAVES; o++)
            if (o != s && (s_req[o].read || s_req[o].write)) begin
              failures++; $display("two slaves active");
            end
        end
      end
    end
  end

  always @(posedge clk) if (m_req[0].read && m_req[1].read) contended++;
  always @(posedge clk) if (decode_err) derr++;

  task automatic master(input int m, input int n);
    for (int i = 0; i < n; i++) begin
      int s, w;
      logic [31:0] a, d;
      logic we, unm;
      s   = $urandom_range(N_SLAVES - 1, 0);
      w   = $urandom_range(15, 0);
      unm = ($urandom_range(15, 0) == 0);
      a   = unm ? 32'h0000_0800 + 32'(4 * w) : BASES[s] + 32'(4 * w);
      // master m owns words with w[0] == m, so the scoreboard is race free
      if (!unm) begin w = (w & ~1) | m; a = BASES[s] + 32'(4 * w); end
      we = 1'($urandom);
      d  = $urandom;
      @(negedge clk);
      m_req[m] = '{addr: a, read: !we, write: we, wdata: d};
      #1;
      while (m_rsp[m].waitreq) begin @(negedge clk); #1; end
      checks++;
      if (unm) begin
        if (!we && m_rsp[m].rdata !== 32'd0) begin failures++; $display("unmapped read not 0"); end
      end else if (we) ref_mem[s][w] = d;
      else if (m_rsp[m].rdata !== ref_mem[s][w]) begin
        failures++;
        $display("master %0d read slave %0d word %0d: %h expected %h", m, s, w, m_rsp[m].rdata, ref_mem[s][w]);
      end
      served[m]++;
      @(negedge clk);
      m_req[m] = MM_REQ_IDLE;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N_SLAVES; s++) begin
      stall[s] = 0;
      for (int w = 0; w < 16; w++) begin mem[s][w] = 32'(s * 100 + w); ref_mem[s][w] = 32'(s * 100 + w); end
    end
    for (int m = 0; m < N_MASTERS; m++) begin m_req[m] = MM_REQ_IDLE; served[m] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      master(0, 400);
      master(1, 400);
    join
    checks++;
    if (served[0] != 400 || served[1] != 400) failures++;
    checks++;
    if (contended == 0) begin failures++; $display("no contention happened"); end
    checks++;
    if (derr == 0) begin failures++; $display("no unmapped access happened"); end
    $display("contended cycles %0d, unmapped accesses %0d", contended, derr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

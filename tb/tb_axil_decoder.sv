// tb_axil_decoder - self-checking testbench of the AXI4-Lite address decoder.
//
// Five slave models with random ready stalls sit behind the decoder. Random
// writes go to random words of random slaves and are read back through the
// decoder; a reference copy kept in the testbench gives the expected data,
// and the slave ID in the returned data shows that the right slave answered.
// Writes and reads to the unmapped windows 5-7 must return DECERR without
// reaching any slave.
//
// The platform description only says the devices are AXI-based; the
// address map being tested is this design's choice.
module tb_axil_decoder;
  import io_pkg::*;

  localparam int unsigned N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axil_req_t m_req [N];
  axil_rsp_t m_rsp [N];

  axil_decoder #(.N_SLAVES(N), .SEL_LSB(12)) dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp
  );

  for (genvar i = 0; i < N; i++) begin : g_slv
    axil_tb_slave #(.ID(4'(i + 1))) slv (.clk, .rst_n, .req(m_req[i]), .rsp(m_rsp[i]));
  end

  axil_master_bfm bfm (.clk, .req(s_req), .rsp(s_rsp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned total_writes();
    return g_slv[0].slv.writes + g_slv[1].slv.writes + g_slv[2].slv.writes +
           g_slv[3].slv.writes + g_slv[4].slv.writes;
  endfunction

  logic [27:0] model [N][4];
  axi_resp_e r;
  axil_data_t d;
  int unsigned decerr = 0, wrs = 0;

  initial begin
    for (int s = 0; s < int'(N); s++) for (int w = 0; w < 4; w++) model[s][w] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < 200; k++) begin
      int unsigned s = $urandom_range(0, N - 1);
      int unsigned w = $urandom_range(0, 3);
      logic [31:0] v = $urandom;
      axil_addr_t a = 16'((s << 12) | (w << 2));
      if ($urandom_range(0, 1) == 0) begin
        bfm.write(a, v, r);
        check(r == RESP_OKAY, "write OKAY");
        model[s][w] = v[27:0];
        wrs++;
      end else begin
        bfm.read(a, d, r);
        check(r == RESP_OKAY && d[31:28] == 4'(s + 1) && d[27:0] == model[s][w],
              $sformatf("read slave %0d word %0d: %h", s, w, d));
      end
    end
    check(total_writes() == wrs, "every write reached exactly one slave");

    for (int s = N; s < 8; s++) begin
      bfm.write(16'(s << 12), 32'hDEAD_BEEF, r);
      check(r == RESP_DECERR, $sformatf("unmapped write %0d DECERR", s));
      if (r == RESP_DECERR) decerr++;
      bfm.read(16'(s << 12), d, r);
      check(r == RESP_DECERR && d == 0, $sformatf("unmapped read %0d DECERR", s));
      if (r == RESP_DECERR) decerr++;
    end
    check(total_writes() == wrs, "unmapped writes reached no slave");
    check(decerr == 2 * (8 - N), "all unmapped accesses flagged");

    check(bfm.timeouts == 0, "no bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

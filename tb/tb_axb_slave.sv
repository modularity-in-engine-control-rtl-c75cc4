// tb_axb_slave: a bridge slave (the block under test) answering a bridge
// master over two skewed channel models with 1 bit error per 1000; behind
// the slave is a memory whose READY and VALID signals stall at random.
// AXI4-Lite writes (with partial byte strobes) and reads go through the
// master's subordinate port at addresses inside a 64 MiB slot window
// placed at 0x4400_0000. Checks: read data equal a reference memory; the
// card sees only the offset inside the window; SLVERR from the card comes
// back as RRESP/BRESP; card interrupt status appears on `irq` and clears;
// every transaction completes exactly once despite the bit errors
// (one card access per host access); the link locks before traffic.
module tb_axb_slave;
  import axb_pkg::*;
  localparam logic [31:0] BASE = 32'h4400_0000;
  localparam int STALL = 1, ERRS = 1, NOPS = 300;
  logic clk = 0, rst = 1;
  axil_req_t h_req = '0, c_req;
  axil_rsp_t h_rsp, c_rsp;
  logic [7:0] irq, c_irq;
  logic m_tx, m_rx, s_tx, s_rx, m_locked, s_locked;
  logic [4:0] m_tap, s_tap;
  link_state_e m_st, s_st;
  logic [31:0] m_txc, m_rtc, m_crc, m_syn, s_txc, s_rtc, s_crc, s_syn;
  int unsigned err_rate = 0, f1, f2;
  int unsigned accesses;
  int checks = 0, failures = 0, cyc = 0;

  axb_master dut (.clk, .rst, .s_axil_req(h_req), .s_axil_rsp(h_rsp), .irq, .locked(m_locked),
    .link_state(m_st), .tx_count(m_txc), .retx_count(m_rtc), .crc_errors(m_crc), .sync_errors(m_syn),
    .tx_bit(m_tx), .rx_bit(m_rx), .delay_tap(m_tap));
  axb_slave card (.clk, .rst, .m_axil_req(c_req), .m_axil_rsp(c_rsp), .irq_in(c_irq), .locked(s_locked),
    .link_state(s_st), .tx_count(s_txc), .retx_count(s_rtc), .crc_errors(s_crc), .sync_errors(s_syn),
    .tx_bit(s_tx), .rx_bit(s_rx), .delay_tap(s_tap));
  axb_tb_channel #(.SKEW(7), .LAT(6)) ch_ms (.clk, .in_bit(m_tx), .tap(s_tap), .err_per_1000(err_rate),
    .cut(1'b0), .out_bit(s_rx), .flips(f1));
  axb_tb_channel #(.SKEW(20), .LAT(6)) ch_sm (.clk, .in_bit(s_tx), .tap(m_tap), .err_per_1000(err_rate),
    .cut(1'b0), .out_bit(m_rx), .flips(f2));
  axb_tb_axil_mem #(.WORDS(256), .STALL(STALL)) mem (.clk, .rst, .req(c_req), .rsp(c_rsp), .irq_out(c_irq),
    .accesses);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  // the card must only see offsets inside the slot window
  int bad_card_addr = 0;
  always @(posedge clk) if (!rst) begin
    if (c_req.arvalid && c_req.araddr >= 32'h0400_0000) bad_card_addr++;
    if (c_req.awvalid && c_req.awaddr >= 32'h0400_0000) bad_card_addr++;
  end

  task automatic axil_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] strb,
                            output logic [1:0] resp);
    @(negedge clk);
    h_req.awaddr = a; h_req.awvalid = 1; h_req.wdata = d; h_req.wstrb = strb; h_req.wvalid = 1;
    h_req.bready = 1;
    do @(posedge clk); while (!(h_rsp.awready && h_rsp.wready));
    @(negedge clk) begin h_req.awvalid = 0; h_req.wvalid = 0; end
    while (!h_rsp.bvalid) @(negedge clk);
    resp = h_rsp.bresp;
    @(posedge clk);
    @(negedge clk) h_req.bready = 0;
  endtask

  task automatic axil_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp,
                           output int lat);
    int t0;
    @(negedge clk);
    t0 = cyc;
    h_req.araddr = a; h_req.arvalid = 1; h_req.rready = 1;
    do @(posedge clk); while (!h_rsp.arready);
    @(negedge clk) h_req.arvalid = 0;
    while (!h_rsp.rvalid) @(negedge clk);
    d = h_rsp.rdata; resp = h_rsp.rresp; lat = cyc - t0;
    @(posedge clk);
    @(negedge clk) h_req.rready = 0;
  endtask

  logic [31:0] model [256];
  initial begin
    logic [31:0] d; logic [1:0] r; int lat, max_lat = 0, bad_data = 0, bad_resp = 0;
    foreach (model[i]) model[i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    while (!(m_locked && s_locked) && cyc < 50000) @(posedge clk);
    check(m_locked && s_locked, "lane locked");
    err_rate = ERRS;
    for (int i = 0; i < NOPS; i++) begin
      automatic int w = 1 + ($urandom % 255);
      if ($urandom % 2) begin
        automatic logic [31:0] v = $urandom;
        automatic logic [3:0] s = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
        axil_write(BASE + 4 * w, v, s, r);
        for (int b = 0; b < 4; b++) if (s[b]) model[w][8*b +: 8] = v[8*b +: 8];
        if (r != RESP_OKAY) bad_resp++;
      end else begin
        axil_read(BASE + 4 * w, d, r, lat);
        if (d != model[w]) bad_data++;
        if (r != RESP_OKAY) bad_resp++;
        if (lat > max_lat) max_lat = lat;
      end
    end
    check(bad_data == 0, "read data");
    check(bad_resp == 0, "responses okay");
    check(bad_card_addr == 0, "card sees window offsets");
    check(accesses == NOPS, "one card access per host access");
    if (ERRS == 0) check(max_lat < 800, "read latency under 800 cycles");
    $display("max read latency %0d cycles, retx m=%0d s=%0d", max_lat, m_rtc, s_rtc);
    // error responses
    axil_read(BASE + 32'h0100_0010, d, r, lat);
    check(r == RESP_SLVERR, "SLVERR on read");
    axil_write(BASE + 32'h0100_0010, 32'h1, 4'hF, r);
    check(r == RESP_SLVERR, "SLVERR on write");
    // interrupts through word 0 of the card memory
    axil_write(BASE, 32'h0000_0005, 4'h1, r);
    repeat (600) @(negedge clk);
    check(irq == 8'h05, "interrupt status raised");
    axil_write(BASE, 32'h0000_0000, 4'h1, r);
    repeat (600) @(negedge clk);
    check(irq == 8'h00, "interrupt status cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

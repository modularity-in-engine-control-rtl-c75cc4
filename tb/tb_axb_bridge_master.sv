// tb_axb_bridge_master: test of the main-board bridge with two slots.
// Two bridge slaves with card memories are connected to the bridge's lanes
// through channel models with skew. Checked: the control registers (CTRL
// read-back, PROGRAM_B per slot, the card reset line, unmapped addresses
// answering SLVERR), both lanes locking, independent traffic on both slots
// running in parallel (a write through slot 0 never shows up on slot 1 and
// the other way round), interrupt status per slot, the per-lane packet
// counters in the status registers, and the master reset: while MSTR_RESET
// is set both lanes drop lock, after release they resynchronise and
// traffic continues with the cards' data intact.
module tb_axb_bridge_master;
  import axb_pkg::*;
  localparam int NS = 2;
  localparam logic [31:0] CTRL = 32'h0000_0000;

  logic clk = 0, rst = 1;
  axil_req_t c_req = '0;
  axil_rsp_t c_rsp;
  axil_req_t [NS-1:0] h_req = '0, k_req;
  axil_rsp_t [NS-1:0] h_rsp, k_rsp;
  logic [NS-1:0][7:0] irq, k_irq;
  logic card_rst, cclk, din;
  logic [NS-1:0] program_b, m_tx, m_rx, s_tx, s_rx, card_locked;
  logic [NS-1:0][4:0] m_tap, s_tap;
  int unsigned flips [4], accesses [NS];
  int checks = 0, failures = 0, cyc = 0;

  axb_bridge_master #(.NSLOTS(NS)) dut (.clk, .rst, .s_ctrl_req(c_req), .s_ctrl_rsp(c_rsp),
    .s_slot_req(h_req), .s_slot_rsp(h_rsp), .irq, .card_rst, .program_b, .init_b(1'b1), .done(1'b0),
    .cclk, .din, .tx_bit(m_tx), .rx_bit(m_rx), .delay_tap(m_tap));

  for (genvar s = 0; s < NS; s++) begin : g_card
    axb_tb_channel #(.SKEW(7 + 13 * s), .LAT(4)) ch_down (.clk, .in_bit(m_tx[s]), .tap(s_tap[s]),
      .err_per_1000(0), .cut(1'b0), .out_bit(s_rx[s]), .flips(flips[2 * s]));
    axb_tb_channel #(.SKEW(20 - 9 * s), .LAT(6)) ch_up (.clk, .in_bit(s_tx[s]), .tap(m_tap[s]),
      .err_per_1000(0), .cut(1'b0), .out_bit(m_rx[s]), .flips(flips[2 * s + 1]));
    axb_slave u_slave (.clk, .rst(rst || card_rst), .m_axil_req(k_req[s]), .m_axil_rsp(k_rsp[s]),
      .irq_in(k_irq[s]), .locked(card_locked[s]), .link_state(), .tx_count(), .retx_count(),
      .crc_errors(), .sync_errors(), .tx_bit(s_tx[s]), .rx_bit(s_rx[s]), .delay_tap(s_tap[s]));
    axb_tb_axil_mem #(.WORDS(64), .STALL(s == 1)) mem (.clk, .rst(rst), .req(k_req[s]), .rsp(k_rsp[s]),
      .irq_out(k_irq[s]), .accesses(accesses[s]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  // ------------------------------------------------------------ AXI4-Lite tasks
  task automatic ctrl_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    c_req.awaddr = a; c_req.awvalid = 1; c_req.wdata = d; c_req.wstrb = 4'hF; c_req.wvalid = 1; c_req.bready = 1;
    do @(posedge clk); while (!(c_rsp.awready && c_rsp.wready));
    @(negedge clk) begin c_req.awvalid = 0; c_req.wvalid = 0; end
    while (!c_rsp.bvalid) @(negedge clk);
    @(posedge clk);
    @(negedge clk) c_req.bready = 0;
  endtask

  task automatic ctrl_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    c_req.araddr = a; c_req.arvalid = 1; c_req.rready = 1;
    do @(posedge clk); while (!c_rsp.arready);
    @(negedge clk) c_req.arvalid = 0;
    while (!c_rsp.rvalid) @(negedge clk);
    d = c_rsp.rdata;
    @(posedge clk);
    @(negedge clk) c_req.rready = 0;
  endtask

  task automatic slot_write(input int s, input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    h_req[s].awaddr = a; h_req[s].awvalid = 1; h_req[s].wdata = d; h_req[s].wstrb = 4'hF;
    h_req[s].wvalid = 1; h_req[s].bready = 1;
    do @(posedge clk); while (!(h_rsp[s].awready && h_rsp[s].wready));
    @(negedge clk) begin h_req[s].awvalid = 0; h_req[s].wvalid = 0; end
    while (!h_rsp[s].bvalid) @(negedge clk);
    resp = h_rsp[s].bresp;
    @(posedge clk);
    @(negedge clk) h_req[s].bready = 0;
  endtask

  task automatic slot_read(input int s, input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp,
                           output int lat);
    int t0;
    @(negedge clk);
    t0 = cyc;
    h_req[s].araddr = a; h_req[s].arvalid = 1; h_req[s].rready = 1;
    do @(posedge clk); while (!h_rsp[s].arready);
    @(negedge clk) h_req[s].arvalid = 0;
    while (!h_rsp[s].rvalid) @(negedge clk);
    d = h_rsp[s].rdata; resp = h_rsp[s].rresp; lat = cyc - t0;
    @(posedge clk);
    @(negedge clk) h_req[s].rready = 0;
  endtask

  logic [31:0] model [NS][64];

  task automatic traffic(input int s, input int n);
    logic [31:0] d; logic [1:0] r; int lat;
    for (int i = 0; i < n; i++) begin
      int w = 1 + ($urandom % 63);
      if ($urandom % 2) begin
        logic [31:0] v = $urandom;
        slot_write(s, 32'h4400_0000 + 4 * w, v, r);
        model[s][w] = v;
        check(r == RESP_OKAY, "write response");
      end else begin
        slot_read(s, 32'h4400_0000 + 4 * w, d, r, lat);
        check(d == model[s][w] && r == RESP_OKAY, "read data");
      end
    end
  endtask

  task automatic wait_locked(input int limit);
    logic [31:0] st;
    int t0 = cyc;
    do begin
      repeat (50) @(negedge clk);
      ctrl_read(CTRL + 4, st);
    end while (st[NS-1:0] != '1 && cyc - t0 < limit);
    check(st[NS-1:0] == '1, "both lanes locked");
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r; int lat;
    logic [31:0] tx0 [NS];
    foreach (model[s, i]) model[s][i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    // control registers
    ctrl_write(CTRL, 32'h20);
    check(program_b == 2'b01 && !card_rst, "PROGRAM_B of slot 1 only");
    ctrl_read(CTRL, d);
    check(d == 32'h20, "CTRL read-back");
    ctrl_write(CTRL, 32'h1);
    check(card_rst && program_b == 2'b11, "card reset line");
    ctrl_write(CTRL, 32'h0);
    @(negedge clk);
    c_req.araddr = CTRL + 32'h800; c_req.arvalid = 1; c_req.rready = 1;
    while (!c_rsp.rvalid) @(negedge clk);
    check(c_rsp.rresp == RESP_SLVERR, "unmapped address answers SLVERR");
    c_req.arvalid = 0;
    @(negedge clk) c_req.rready = 0;
    wait_locked(50000);
    // parallel traffic, slot isolation
    fork
      traffic(0, 80);
      traffic(1, 80);
    join
    for (int w = 1; w < 64; w++) begin
      slot_read(0, 32'h4400_0000 + 4 * w, d, r, lat);
      check(d == model[0][w], "slot 0 contents after parallel traffic");
      slot_read(1, 32'h4400_0000 + 4 * w, d, r, lat);
      check(d == model[1][w], "slot 1 contents after parallel traffic");
    end
    // interrupts per slot
    slot_write(1, 32'h4400_0000, 32'h3C, r);
    repeat (600) @(negedge clk);
    check(irq[1] == 8'h3C && irq[0] == 8'h00, "interrupt status of slot 1 only");
    // counters
    for (int s = 0; s < NS; s++) begin
      ctrl_read(CTRL + 32'h10 + 16 * s, tx0[s]);
      check(tx0[s] > 100, "packet counter");
    end
    // master reset: lock lost, then regained, cards keep their data
    ctrl_write(CTRL, 32'h2);
    repeat (20) @(negedge clk);
    ctrl_read(CTRL + 4, d);
    check(d[NS-1:0] == '0, "lanes unlocked during master reset");
    ctrl_read(CTRL + 32'h10, d);
    check(d == 0, "counters cleared by master reset");
    ctrl_write(CTRL, 32'h0);
    wait_locked(50000);
    traffic(0, 20);
    traffic(1, 20);
    check(irq[1] == 8'h3C, "interrupt status sent again after master reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

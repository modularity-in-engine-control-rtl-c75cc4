// tb_axb_system: end-to-end test of the whole expansion bus at its default
// size (four slots), with every lane behind channel models that have their
// own skew, delay and bit-error rate, and a memory on every card.
// It walks through the life of the system:
//   1. programming: PROGRAM_B of slot 0 is pulsed through the control
//      port, a card-FPGA model answers on INIT_B, a short bitstream is
//      written to the bitstream register and checked bit by bit on
//      CCLK/DIN, the model raises DONE; then card reset and master reset
//      are pulsed as after programming;
//   2. all four lanes lock (status register), each delay tap in its eye;
//   3. quiet traffic to every slot: data, read latency below one
//      microsecond at 800 Mbit/s (800 bit times) and a throughput of at
//      least 1.3 million transactions per second (at most 615 bit times
//      per transaction);
//   4. all four slots in parallel at 1 bit error per 1000;
//   5. a burst of 25 bit errors per 1000 on slot 1;
//   6. slot 2's cable cut during a transaction, long enough for the ARQ to
//      give up and resynchronise; the transaction completes afterwards;
//   7. card interrupts on slot 3, SLVERR responses, status counters.
// Each mechanism is counted and a failure is counted for any that never
// happened: delay-tap stepping, bit slip, SYNC state, frames, CRC drops,
// resynchronisations, retransmissions, soft resets, duplicates, ACK_ONLY
// and piggy-backed acknowledgements, SYN, interrupt updates, SLVERR,
// master reset, card reset, programming.
module tb_axb_system;
  import axb_pkg::*;
  localparam int NS = 4;
  localparam logic [31:0] CTRL = 32'h43FF_F000;
  localparam int SKEW_M [NS] = '{3, 17, 26, 9};   // master receivers
  localparam int SKEW_S [NS] = '{12, 0, 21, 30};  // card receivers

  logic clk = 0, rst = 1;
  axil_req_t c_req = '0;
  axil_rsp_t c_rsp;
  axil_req_t [NS-1:0] h_req = '0, k_req;
  axil_rsp_t [NS-1:0] h_rsp, k_rsp;
  logic [NS-1:0][7:0] irq, k_irq, mem_irq, irq_noise = '0;
  bit irq_noise_on = 0;
  logic card_rst, init_b, done, cclk, din;
  logic [NS-1:0] program_b, m_tx, m_rx, s_tx, s_rx, card_locked;
  logic [NS-1:0][4:0] m_tap, s_tap;
  int unsigned err_m [NS], err_s [NS], flips_m [NS], flips_s [NS];
  logic [NS-1:0] cut = '0;
  int unsigned accesses [NS];
  int checks = 0, failures = 0, cyc = 0;

  axb_system dut (.clk, .rst, .s_ctrl_req(c_req), .s_ctrl_rsp(c_rsp), .s_slot_req(h_req), .s_slot_rsp(h_rsp),
    .irq, .card_rst, .program_b, .init_b, .done, .cclk, .din,
    .m_tx_bit(m_tx), .m_rx_bit(m_rx), .m_delay_tap(m_tap), .s_tx_bit(s_tx), .s_rx_bit(s_rx),
    .s_delay_tap(s_tap), .card_axil_req(k_req), .card_axil_rsp(k_rsp), .card_irq(k_irq), .card_locked);

  for (genvar s = 0; s < NS; s++) begin : g_lane
    axb_tb_channel #(.SKEW(SKEW_S[s]), .LAT(4 + s)) ch_down (.clk, .in_bit(m_tx[s]), .tap(s_tap[s]),
      .err_per_1000(err_s[s]), .cut(cut[s]), .out_bit(s_rx[s]), .flips(flips_s[s]));
    axb_tb_channel #(.SKEW(SKEW_M[s]), .LAT(5 + s)) ch_up (.clk, .in_bit(s_tx[s]), .tap(m_tap[s]),
      .err_per_1000(err_m[s]), .cut(cut[s]), .out_bit(m_rx[s]), .flips(flips_m[s]));
    axb_tb_axil_mem #(.WORDS(256), .STALL(s % 2 == 1)) mem (.clk, .rst(rst || card_rst), .req(k_req[s]),
      .rsp(k_rsp[s]), .irq_out(mem_irq[s]), .accesses(accesses[s]));
    assign k_irq[s] = mem_irq[s] ^ irq_noise[s];
  end

  // random interrupt activity on slots 0-2 while irq_noise_on
  always @(negedge clk) if (irq_noise_on && $urandom % 50 == 0) irq_noise[$urandom % 3] <= 8'($urandom);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_tapstep = 0, n_slip = 0, n_sync = 0, n_frame = 0, n_crc = 0, n_resync = 0, n_retx = 0,
      n_soft = 0, n_dup = 0, n_ackonly = 0, n_piggy = 0, n_syn = 0, n_irq = 0, n_slverr = 0,
      n_mreset = 0, n_creset = 0, n_prog = 0;

  for (genvar s = 0; s < NS; s++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_link.u_serdes.bitslip) n_slip++;
      if (dut.g_card[s].u_slave.u_ep.u_link.u_serdes.bitslip) n_slip++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_link.state == LS_SYNC) n_sync++;
      if (dut.g_card[s].u_slave.u_ep.u_link.state == LS_SYNC) n_sync++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_link.pkt_out_valid) n_frame++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_link.crc_err) n_crc++;
      if (dut.g_card[s].u_slave.u_ep.u_link.crc_err) n_crc++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_link.sync_err) n_resync++;
      if (dut.g_card[s].u_slave.u_ep.u_link.sync_err) n_resync++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.soft_reset) n_soft++;
      if (dut.g_card[s].u_slave.u_ep.u_arq.soft_reset) n_soft++;
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.r_valid &&
          dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.rx_is_data &&
          !dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.rx_new) n_dup++;
      if (dut.g_card[s].u_slave.u_ep.u_arq.r_valid && dut.g_card[s].u_slave.u_ep.u_arq.rx_is_data &&
          !dut.g_card[s].u_slave.u_ep.u_arq.rx_new) n_dup++;
      if (dut.g_card[s].u_slave.u_ep.u_arq.l_valid && dut.g_card[s].u_slave.u_ep.u_arq.l_ready) begin
        if (dut.g_card[s].u_slave.u_ep.u_arq.l_pkt.hdr.typ == PT_ACK_ONLY) n_ackonly++;
        else if (dut.g_card[s].u_slave.u_ep.u_arq.l_pkt.hdr.ack) n_piggy++;
        if (dut.g_card[s].u_slave.u_ep.u_arq.l_pkt.hdr.typ == PT_SYN) n_syn++;
        if (dut.g_card[s].u_slave.u_ep.u_arq.l_pkt.hdr.typ == PT_IRQ_UPDATE) n_irq++;
      end
      if (dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.l_valid && dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.l_ready) begin
        if (dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.l_pkt.hdr.typ == PT_ACK_ONLY) n_ackonly++;
        else if (dut.u_bridge.g_slot[s].u_master.u_ep.u_arq.l_pkt.hdr.ack) n_piggy++;
      end
    end
  end

  // card FPGA configuration model: INIT_B low while PROGRAM_B of slot 0 is
  // low and for 20 cycles after, DONE once 64 bits were clocked in
  int init_cnt = 0, bits_in = 0;
  bit got_bits[$];
  logic cclk_q = 0;
  always @(posedge clk) begin
    cclk_q <= cclk;
    if (rst) begin init_cnt <= 0; bits_in <= 0; end
    else begin
      if (!program_b[0]) begin init_cnt <= 20; bits_in <= 0; got_bits.delete(); end
      else if (init_cnt > 0) init_cnt <= init_cnt - 1;
      if (cclk && !cclk_q) begin bits_in <= bits_in + 1; got_bits.push_back(din); end
    end
  end
  assign init_b = (init_cnt == 0) && program_b[0];
  assign done   = bits_in >= 64;

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

  // slot windows of the reference system: 0x4400_0000 + s * 64 MiB
  function automatic logic [31:0] slot_base(input int s);
    return 32'h4400_0000 + 32'(s) * 32'h0400_0000;
  endfunction

  logic [31:0] model [NS][256];
  int bad_data [NS], bad_resp [NS];

  task automatic traffic(input int s, input int n);
    logic [31:0] d; logic [1:0] r; int lat;
    for (int i = 0; i < n; i++) begin
      int w = 1 + ($urandom % 255);
      if ($urandom % 2) begin
        logic [31:0] v = $urandom;
        slot_write(s, slot_base(s) + 4 * w, v, r);
        model[s][w] = v;
        if (r != RESP_OKAY) bad_resp[s]++;
      end else begin
        slot_read(s, slot_base(s) + 4 * w, d, r, lat);
        if (d != model[s][w]) bad_data[s]++;
        if (r != RESP_OKAY) bad_resp[s]++;
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
    check(st[NS-1:0] == '1, "all master lanes locked");
    check(card_locked == '1, "all card lanes locked");
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r; int lat, max_lat, t0, soft0;
    foreach (model[s, i]) model[s][i] = '0;
    foreach (err_m[s]) begin err_m[s] = 0; err_s[s] = 0; bad_data[s] = 0; bad_resp[s] = 0; end
    repeat (4) @(negedge clk);
    rst = 0;

    // 1. programming slot 0, then card and master reset
    $display("[%0d] %s", cyc, "programming slot 0, then card and master reset");
    ctrl_write(CTRL, 32'h10);                     // PROG[0]
    check(program_b == 4'b1110, "PROGRAM_B[0] low");
    repeat (5) @(negedge clk);
    check(!init_b, "card clears its configuration (INIT_B low)");
    ctrl_write(CTRL, 32'h0);
    while (!init_b) @(negedge clk);
    ctrl_write(CTRL + 8, 32'hAA55_F00F);
    ctrl_write(CTRL + 8, 32'h0123_4567);
    t0 = cyc;
    while (!done && cyc - t0 < 5000) @(negedge clk);
    ctrl_read(CTRL + 4, d);
    check(d[9] && d[8], "DONE and INIT_B high in status");
    if (got_bits.size() == 64) begin
      logic [63:0] v;
      foreach (got_bits[i]) v[63 - i] = got_bits[i];
      check(v == 64'hAA55_F00F_0123_4567, "bitstream clocked out");
      n_prog++;
    end else check(0, "bitstream length");
    ctrl_write(CTRL, 32'h3);                      // card reset and master reset
    check(card_rst, "card reset line");
    n_creset++; n_mreset++;
    repeat (10) @(negedge clk);
    ctrl_write(CTRL, 32'h0);

    // 2. lock
    $display("[%0d] %s", cyc, "lock");
    wait_locked(100000);
    for (int s = 0; s < NS; s++) begin
      int dm, ds;
      dm = (m_tap[s] > SKEW_M[s]) ? m_tap[s] - SKEW_M[s] : SKEW_M[s] - m_tap[s];
      ds = (s_tap[s] > SKEW_S[s]) ? s_tap[s] - SKEW_S[s] : SKEW_S[s] - s_tap[s];
      if (dm > 16) dm = 32 - dm;
      if (ds > 16) ds = 32 - ds;
      if (!(dm <= 3 && ds <= 3)) $display("slot %0d m_tap %0d s_tap %0d", s, m_tap[s], s_tap[s]);
      check(dm <= 3 && ds <= 3, "delay taps inside the eye");
      if (m_tap[s] != 0) n_tapstep++;
      if (s_tap[s] != 0) n_tapstep++;
    end

    // 3. quiet traffic, latency and throughput
    $display("[%0d] %s", cyc, "quiet traffic, latency and throughput");
    for (int s = 0; s < NS; s++) traffic(s, 30);
    max_lat = 0;
    for (int i = 0; i < 20; i++) begin
      slot_read(0, slot_base(0) + 4 * (1 + i), d, r, lat);
      if (lat > max_lat) max_lat = lat;
    end
    check(max_lat < 800, "read latency below 1 us at 800 Mbit/s");
    t0 = cyc;
    for (int i = 0; i < 100; i++) slot_read(0, slot_base(0) + 4 * (1 + i % 200), d, r, lat);
    check((cyc - t0) / 100 <= 615, "throughput of at least 1.3 M transactions/s at 800 Mbit/s");
    $display("read latency max %0d bit times, %0d bit times per back-to-back read", max_lat, (cyc - t0) / 100);

    // 4. all slots in parallel at 1 error per 1000
    $display("[%0d] %s", cyc, "all slots in parallel at 1 error per 1000");
    foreach (err_m[s]) begin err_m[s] = 1; err_s[s] = 1; end
    irq_noise_on = 1;
    fork
      traffic(0, 60);
      traffic(1, 60);
      traffic(2, 60);
      traffic(3, 60);
    join

    // 5. burst errors on slot 1
    $display("[%0d] %s", cyc, "burst errors on slot 1");
    fork
      traffic(1, 20);
      begin
        err_m[1] = 25; err_s[1] = 25;
        repeat (4000) @(negedge clk);
        err_m[1] = 1; err_s[1] = 1;
      end
    join
    irq_noise_on = 0;
    @(negedge clk) irq_noise = '0;
    foreach (err_m[s]) begin err_m[s] = 0; err_s[s] = 0; end

    // 6. cable of slot 2 cut during a write
    $display("[%0d] %s", cyc, "cable of slot 2 cut during a write");
    fork
      begin
        slot_write(2, slot_base(2) + 4 * 7, 32'hCAFE_0007, r);
        check(r == RESP_OKAY, "write across a cable cut completes");
      end
      begin
        repeat (30) @(negedge clk);
        cut[2] = 1;
        soft0 = n_soft;
        t0 = cyc;
        while (n_soft == soft0 && cyc - t0 < 200000) @(negedge clk);
        repeat (1000) @(negedge clk);
        cut[2] = 0;
      end
    join
    model[2][7] = 32'hCAFE_0007;
    slot_read(2, slot_base(2) + 4 * 7, d, r, lat);
    check(d == 32'hCAFE_0007, "data after the cable cut");

    // 7. interrupts, SLVERR, counters
    $display("[%0d] %s", cyc, "interrupts, SLVERR, counters");
    slot_write(3, slot_base(3), 32'h81, r);
    repeat (1000) @(negedge clk);
    check(irq[3] == 8'h81 && irq[0] == 0 && irq[1] == 0 && irq[2] == 0, "slot 3 interrupt status");
    slot_write(3, slot_base(3), 32'h0, r);
    repeat (1000) @(negedge clk);
    check(irq[3] == 8'h00, "slot 3 interrupt cleared");
    slot_read(1, slot_base(1) + 32'h0100_0000, d, r, lat);
    if (r == RESP_SLVERR) n_slverr++;
    slot_write(0, slot_base(0) + 32'h0100_0004, 32'h5, r);
    if (r == RESP_SLVERR) n_slverr++;
    for (int s = 0; s < NS; s++) begin
      logic [31:0] txc, rtc;
      ctrl_read(CTRL + 32'h10 + 16 * s, txc);
      ctrl_read(CTRL + 32'h14 + 16 * s, rtc);
      check(txc > 0, "tx counter");
      n_retx += rtc;
      check(bad_data[s] == 0 && bad_resp[s] == 0, "slot data and responses");
    end
    $display("slips %0d tapsteps %0d sync %0d frames %0d crc %0d resync %0d retx %0d soft %0d dup %0d",
             n_slip, n_tapstep, n_sync, n_frame, n_crc, n_resync, n_retx, n_soft, n_dup);
    $display("ackonly %0d piggy %0d syn %0d irq %0d slverr %0d", n_ackonly, n_piggy, n_syn, n_irq, n_slverr);
    check(n_tapstep > 0, "mechanism: delay tap stepping");
    check(n_slip > 0, "mechanism: bit slip");
    check(n_sync > 0, "mechanism: SYNC state");
    check(n_frame > 0, "mechanism: frames");
    check(n_crc > 0, "mechanism: CRC drop");
    check(n_resync > 0, "mechanism: resynchronisation after bit error");
    check(n_retx > 0, "mechanism: retransmission");
    check(n_soft > 0, "mechanism: soft reset after repeated timeouts");
    check(n_dup > 0, "mechanism: duplicate detection");
    check(n_ackonly > 0, "mechanism: ACK_ONLY packet");
    check(n_piggy > 0, "mechanism: piggy-backed ACK");
    check(n_syn > 0, "mechanism: SYN");
    check(n_irq > 0, "mechanism: IRQ update");
    check(n_slverr == 2, "mechanism: SLVERR");
    check(n_mreset > 0 && n_creset > 0 && n_prog > 0, "mechanism: resets and programming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

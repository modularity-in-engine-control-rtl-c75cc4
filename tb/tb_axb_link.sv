// tb_axb_link: two link-layer ends (A and B) joined by two channel models
// with different skews, so each receiver must find its own delay tap.
// Checks: both ends lock; the ends pass through DESKEW, SLIP, SYNC, IDLE
// and FRAME; the delay tap settles inside the data eye; random packets in both
// directions arrive intact and in order; frame latency is at most (len+7)
// bytes of 8 cycles plus the channel delay; with 25 bit errors per 1000 no corrupted
// packet is delivered and CRC errors and resynchronisations are reported;
// a soft reset drops and restores the lock.
module tb_axb_link;
  import axb_pkg::*;
  localparam int NT = 32;
  logic clk = 0, rst = 1;
  logic a_soft = 0, b_soft = 0;
  logic a_in_valid = 0, a_in_ready, b_in_valid = 0, b_in_ready;
  packet_t a_in = '0, b_in = '0, a_out, b_out;
  logic a_out_valid, b_out_valid, a_locked, b_locked;
  link_state_e a_state, b_state;
  logic a_crc_err, b_crc_err, a_sync_err, b_sync_err;
  logic a_tx, b_tx, a_rx, b_rx;
  logic [4:0] a_tap, b_tap;
  int unsigned err_ab = 0, err_ba = 0, flips_ab, flips_ba;
  int checks = 0, failures = 0, cyc = 0;
  int crc_errs = 0, sync_errs = 0;
  bit seen_state[5];

  axb_link dut_a (.clk, .rst, .soft_reset(a_soft), .pkt_in_valid(a_in_valid), .pkt_in_ready(a_in_ready),
    .pkt_in(a_in), .pkt_out_valid(a_out_valid), .pkt_out(a_out), .locked(a_locked), .state(a_state),
    .crc_err(a_crc_err), .sync_err(a_sync_err), .tx_bit(a_tx), .rx_bit(a_rx), .delay_tap(a_tap));
  axb_link dut_b (.clk, .rst, .soft_reset(b_soft), .pkt_in_valid(b_in_valid), .pkt_in_ready(b_in_ready),
    .pkt_in(b_in), .pkt_out_valid(b_out_valid), .pkt_out(b_out), .locked(b_locked), .state(b_state),
    .crc_err(b_crc_err), .sync_err(b_sync_err), .tx_bit(b_tx), .rx_bit(b_rx), .delay_tap(b_tap));

  axb_tb_channel #(.NTAPS(NT), .SKEW(11), .EYE(3), .LAT(5)) ch_ab (.clk, .in_bit(a_tx), .tap(b_tap),
    .err_per_1000(err_ab), .cut(1'b0), .out_bit(b_rx), .flips(flips_ab));
  axb_tb_channel #(.NTAPS(NT), .SKEW(2), .EYE(3), .LAT(4)) ch_ba (.clk, .in_bit(b_tx), .tap(a_tap),
    .err_per_1000(err_ba), .cut(1'b0), .out_bit(a_rx), .flips(flips_ba));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin seen_state[b_state] = 1; seen_state[a_state] = 1; end
    if (a_crc_err || b_crc_err) crc_errs++;
    if (a_sync_err || b_sync_err) sync_errs++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  function automatic packet_t rnd_pkt();
    packet_t p = '0;
    automatic int len = $urandom % 10;
    p.hdr = make_hdr(pkt_type_e'($urandom % 7), 4'(len));
    p.hdr.ack = 1'($urandom); p.hdr.ackn = 1'($urandom); p.hdr.seqn = 1'($urandom);
    for (int i = 0; i < len; i++) p.payload[i] = 8'($urandom);
    return p;
  endfunction

  packet_t q_ab[$], q_ba[$];
  int t_ab[$];
  int max_lat_err = 0, recv_ab = 0, recv_ba = 0, bad_ab = 0, bad_ba = 0;
  bit strict = 1;

  // receivers: in strict mode every packet must be the next one sent,
  // otherwise a delivered packet must be one of those still outstanding
  always @(posedge clk) if (!rst) begin
    if (b_out_valid) begin
      automatic int k = -1;
      foreach (q_ab[i]) if (k < 0 && q_ab[i] == b_out) k = i;
      if (k < 0 || (strict && k != 0)) bad_ab++;
      else begin
        if (strict && cyc - t_ab[k] > (int'(b_out.hdr.len) + 7) * 8 + 5 + 4) max_lat_err++;
        for (int i = 0; i <= k; i++) begin void'(q_ab.pop_front()); void'(t_ab.pop_front()); end
        recv_ab++;
      end
    end
    if (a_out_valid) begin
      automatic int k = -1;
      foreach (q_ba[i]) if (k < 0 && q_ba[i] == a_out) k = i;
      if (k < 0 || (strict && k != 0)) bad_ba++;
      else begin
        for (int i = 0; i <= k; i++) void'(q_ba.pop_front());
        recv_ba++;
      end
    end
  end

  task automatic send_both(input int n);
    automatic int na = 0, nb = 0;
    bit ha, hb;
    @(negedge clk);
    a_in = rnd_pkt(); b_in = rnd_pkt(); a_in_valid = 1; b_in_valid = 1;
    while ((na < n || nb < n) && cyc < 2000000) begin
      @(posedge clk);
      ha = a_in_valid && a_in_ready;
      hb = b_in_valid && b_in_ready;
      if (ha) begin q_ab.push_back(a_in); t_ab.push_back(cyc); na++; end
      if (hb) begin q_ba.push_back(b_in); nb++; end
      @(negedge clk);
      if (ha) a_in = rnd_pkt();
      if (hb) b_in = rnd_pkt();
      if (na >= n) a_in_valid = 0;
      if (nb >= n) b_in_valid = 0;
    end
    a_in_valid = 0; b_in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (4) @(negedge clk);
    rst = 0;
    t0 = cyc;
    while (!(a_locked && b_locked) && cyc < 60000) @(posedge clk);
    check(a_locked && b_locked, "both ends lock");
    $display("locked after %0d cycles, taps a=%0d b=%0d", cyc - t0, a_tap, b_tap);
    check(b_tap >= 8 && b_tap <= 14, "B tap inside its eye");
    check(a_tap <= 5 || a_tap >= 31, "A tap inside its eye");
    send_both(60);
    repeat (400) @(negedge clk);
    check(q_ab.size() == 0 && q_ba.size() == 0, "all packets delivered");
    check(recv_ab == 60 && recv_ba == 60, "packet counts");
    check(bad_ab == 0 && bad_ba == 0, "no bad packet (quiet)");
    check(max_lat_err == 0, "frame latency");
    check(seen_state[LS_DESKEW] && seen_state[LS_SLIP] && seen_state[LS_SYNC] &&
          seen_state[LS_IDLE] && seen_state[LS_FRAME], "all link states passed");
    // noisy period
    strict = 0;
    err_ab = 25; err_ba = 25;
    send_both(40);
    err_ab = 0; err_ba = 0;
    repeat (3000) @(negedge clk);
    while (!(a_locked && b_locked) && cyc < 1500000) @(posedge clk);
    check(bad_ab == 0 && bad_ba == 0, "no corrupted packet delivered");
    check(crc_errs > 0, "crc errors reported");
    check(sync_errs > 0, "resync after bit errors");
    check(flips_ab + flips_ba > 0, "errors injected");
    $display("noisy: flips %0d, crc errors %0d, resyncs %0d, delivered %0d/%0d", flips_ab + flips_ba,
             crc_errs, sync_errs, recv_ab, recv_ba);
    // soft reset
    q_ab.delete(); q_ba.delete(); t_ab.delete();
    @(negedge clk) a_soft = 1;
    @(negedge clk) a_soft = 0;
    @(negedge clk);
    check(!a_locked, "soft reset drops lock");
    while (!(a_locked && b_locked) && cyc < 1900000) @(posedge clk);
    check(a_locked && b_locked, "relock after soft reset");
    strict = 1;
    send_both(10);
    repeat (400) @(negedge clk);
    check(q_ab.size() == 0 && q_ba.size() == 0 && bad_ab == 0 && bad_ba == 0, "traffic after relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

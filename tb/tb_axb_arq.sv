// tb_axb_arq: two ARQ ends (A and B) joined by a packet-level link model
// that takes one frame at a time, delivers it after a delay that grows with
// its length, and drops frames at random (or all of them during a
// blackout). Random data packets flow both ways while the receive queues
// are at times not ready. Checks: every packet is delivered exactly once
// and in order despite losses; retransmissions, duplicates, ACK_ONLY
// packets and piggy-backed acknowledgements all occur; at most one
// unacknowledged data packet per direction is ever in flight
// (stop-and-wait); a blackout ends in a soft reset after MAX_RETRIES
// timeouts; after resetting B alone, traffic still flows both ways.
module tb_axb_arq;
  import axb_pkg::*;
  localparam int TO = 200, MR = 4;
  logic clk = 0, rst = 1, rst_b = 0;
  int checks = 0, failures = 0, cyc = 0;

  // A and B signals
  logic    aq_valid, aq_ready, al_valid, al_ready, ar_valid, ad_valid, ad_ready, a_soft;
  logic    bq_valid, bq_ready, bl_valid, bl_ready, br_valid, bd_valid, bd_ready, b_soft;
  packet_t aq_pkt, al_pkt, ar_pkt, ad_pkt, bq_pkt, bl_pkt, br_pkt, bd_pkt;
  logic [31:0] a_txc, a_rtc, b_txc, b_rtc;
  logic locked = 1;

  axb_arq #(.TIMEOUT(TO), .MAX_RETRIES(MR)) dut_a (.clk, .rst,
    .q_valid(aq_valid), .q_ready(aq_ready), .q_pkt(aq_pkt), .l_valid(al_valid), .l_ready(al_ready), .l_pkt(al_pkt),
    .r_valid(ar_valid), .r_pkt(ar_pkt), .d_valid(ad_valid), .d_ready(ad_ready), .d_pkt(ad_pkt),
    .locked, .soft_reset(a_soft), .tx_count(a_txc), .retx_count(a_rtc));
  axb_arq #(.TIMEOUT(TO), .MAX_RETRIES(MR)) dut_b (.clk, .rst(rst || rst_b),
    .q_valid(bq_valid), .q_ready(bq_ready), .q_pkt(bq_pkt), .l_valid(bl_valid), .l_ready(bl_ready), .l_pkt(bl_pkt),
    .r_valid(br_valid), .r_pkt(br_pkt), .d_valid(bd_valid), .d_ready(bd_ready), .d_pkt(bd_pkt),
    .locked, .soft_reset(b_soft), .tx_count(b_txc), .retx_count(b_rtc));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  // ---------------------------------------------------------------- link model
  int drop_pct = 0;
  bit blackout = 0;
  int n_ackonly = 0, n_piggy = 0, n_drop = 0;

  // one direction: accept when idle, deliver after a length-dependent delay
  packet_t ab_buf, ba_buf;
  int ab_t = -1, ba_t = -1;
  bit ab_drop, ba_drop;
  assign al_ready = ab_t < 0;
  assign bl_ready = ba_t < 0;
  always @(posedge clk) begin
    ar_valid <= 0; br_valid <= 0;
    if (rst) begin ab_t <= -1; ba_t <= -1; end
    else begin
      if (al_valid && al_ready) begin
        ab_buf <= al_pkt; ab_t <= 40 + 8 * al_pkt.hdr.len;
        ab_drop <= blackout || ($urandom % 100) < drop_pct;
        if (al_pkt.hdr.typ == PT_ACK_ONLY) n_ackonly++;
        else if (al_pkt.hdr.ack) n_piggy++;
      end else if (ab_t == 0) begin
        ab_t <= -1;
        if (!ab_drop) begin br_valid <= 1; br_pkt <= ab_buf; end else n_drop++;
      end else if (ab_t > 0) ab_t <= ab_t - 1;
      if (bl_valid && bl_ready) begin
        ba_buf <= bl_pkt; ba_t <= 40 + 8 * bl_pkt.hdr.len;
        ba_drop <= blackout || ($urandom % 100) < drop_pct;
        if (bl_pkt.hdr.typ == PT_ACK_ONLY) n_ackonly++;
        else if (bl_pkt.hdr.ack) n_piggy++;
      end else if (ba_t == 0) begin
        ba_t <= -1;
        if (!ba_drop) begin ar_valid <= 1; ar_pkt <= ba_buf; end else n_drop++;
      end else if (ba_t > 0) ba_t <= ba_t - 1;
    end
  end

  // ---------------------------------------------------------------- traffic
  packet_t a_src[$], b_src[$], a_exp[$], b_exp[$];
  int a_bad = 0, b_bad = 0, a_got = 0, b_got = 0, dups = 0, softs = 0, q_full = 0;
  int rdy_pct = 100;

  always @(negedge clk) begin
    aq_valid = a_src.size() != 0;
    aq_pkt   = aq_valid ? a_src[0] : '0;
    bq_valid = b_src.size() != 0;
    bq_pkt   = bq_valid ? b_src[0] : '0;
    ad_ready = ($urandom % 100) < rdy_pct;
    bd_ready = ($urandom % 100) < rdy_pct;
  end

  function automatic bit same(input packet_t x, input packet_t y);
    return x.hdr.typ == y.hdr.typ && x.hdr.len == y.hdr.len && x.payload == y.payload;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (aq_valid && aq_ready) void'(a_src.pop_front());
    if (bq_valid && bq_ready) void'(b_src.pop_front());
    // B receives what A sent
    if (bd_valid && bd_ready) begin
      if (a_exp.size() == 0 || !same(bd_pkt, a_exp[0])) b_bad++;
      else begin void'(a_exp.pop_front()); b_got++; end
    end
    if (ad_valid && ad_ready) begin
      if (b_exp.size() == 0 || !same(ad_pkt, b_exp[0])) a_bad++;
      else begin void'(b_exp.pop_front()); a_got++; end
    end
    if (bd_valid && !bd_ready) q_full++;
    if (br_valid && dut_b.rx_is_data && !dut_b.rx_new) dups++;
    if (ar_valid && dut_a.rx_is_data && !dut_a.rx_new) dups++;
    if (a_soft || b_soft) softs++;
  end

  function automatic packet_t rnd_pkt();
    packet_t p = '0;
    automatic int len = $urandom % 10;
    p.hdr = make_hdr(pkt_type_e'($urandom % 5), 4'(len));
    for (int i = 0; i < len; i++) p.payload[i] = 8'($urandom);
    return p;
  endfunction

  task automatic queue_both(input int n);
    packet_t p, q;
    for (int i = 0; i < n; i++) begin
      p = rnd_pkt();
      q = rnd_pkt();
      a_src.push_back(p); a_exp.push_back(p);
      b_src.push_back(q); b_exp.push_back(q);
    end
  endtask

  task automatic drain(input int limit);
    automatic int t0 = cyc;
    while ((a_exp.size() != 0 || b_exp.size() != 0) && cyc - t0 < limit) @(posedge clk);
  endtask

  // stop-and-wait: the data packet offered to the link never changes
  // while unacknowledged (checked through the retransmission buffer)
  int sw_viol = 0;
  always @(posedge clk) if (!rst && dut_a.st == 1 && aq_valid && aq_ready) sw_viol++;

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    // phase 1: clean link
    queue_both(30);
    drain(200000);
    check(a_exp.size() == 0 && b_exp.size() == 0, "clean: all delivered");
    check(a_rtc == 0 && b_rtc == 0, "clean: no retransmission");
    check(a_txc == 31 && b_txc == 31, "clean: tx count incl. SYN");
    // phase 2: 20% frame loss, receive queues often not ready
    drop_pct = 20; rdy_pct = 40;
    queue_both(80);
    drain(2000000);
    check(a_exp.size() == 0 && b_exp.size() == 0, "lossy: all delivered");
    check(a_rtc > 0 && b_rtc > 0, "lossy: retransmissions");
    check(dups > 0, "lossy: duplicates detected");
    check(q_full > 0, "lossy: receive queue full seen");
    drop_pct = 0; rdy_pct = 100;
    repeat (3 * TO) @(negedge clk);   // outstanding acknowledgements settle
    // phase 3: blackout until a soft reset is requested
    blackout = 1;
    queue_both(1);
    begin
      automatic int t0 = cyc;
      automatic int softs0 = softs;
      while (softs == softs0 && cyc - t0 < 20000) @(posedge clk);
      check(softs > softs0, "blackout: soft reset after repeated timeouts");
      $display("blackout: soft reset after %0d cycles", cyc - t0);
      check(cyc - t0 >= MR * TO, "blackout: soft reset only after MAX_RETRIES timeouts");
    end
    @(negedge clk) locked = 0;
    repeat (50) @(negedge clk);
    blackout = 0; locked = 1;
    drain(200000);
    check(a_exp.size() == 0 && b_exp.size() == 0, "after soft reset: delivered");
    // phase 4: reset B alone, then more traffic
    repeat (500) @(negedge clk);
    rst_b = 1;
    @(negedge clk) rst_b = 0;
    queue_both(20);
    drain(200000);
    check(a_exp.size() == 0 && b_exp.size() == 0, "after B reset: delivered");
    check(a_bad == 0 && b_bad == 0, "no loss, duplicate or reorder");
    check(n_ackonly > 0, "ACK_ONLY packets sent");
    check(n_piggy > 0, "piggy-backed acknowledgements sent");
    check(sw_viol == 0, "stop-and-wait");
    $display("delivered %0d/%0d, retx %0d/%0d, dups %0d, ackonly %0d, piggy %0d, dropped %0d",
             b_got, a_got, a_rtc, b_rtc, dups, n_ackonly, n_piggy, n_drop);
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

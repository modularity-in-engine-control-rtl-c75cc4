// tb_axb_ctrl: drives the control port with AXI4-Lite writes and reads and
// checks the register map: CTRL bits reach card_rst, mstr_rst and
// PROGRAM_B (active low); STATUS shows lock, INIT_B, DONE and queue busy;
// counter registers return the per-lane inputs; a word written to the
// bitstream register appears on DIN at rising CCLK edges; an unmapped
// address answers SLVERR.
module tb_axb_ctrl;
  import axb_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst = 1;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  logic card_rst, mstr_rst, init_b = 1, done = 0, cclk, din;
  logic [NS-1:0] program_b, locked = '0;
  logic [NS-1:0][31:0] txc, rtc, crc, syn;
  int checks = 0, failures = 0;

  axb_ctrl #(.NSLOTS(NS), .CCLK_HALF(2)) dut (
    .clk, .rst, .s_axil_req(req), .s_axil_rsp(rsp), .card_rst, .mstr_rst, .program_b,
    .init_b, .done, .cclk, .din, .locked, .tx_count(txc), .retx_count(rtc),
    .crc_errors(crc), .sync_errors(syn));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic axil_write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    req.awaddr = a; req.awvalid = 1; req.wdata = d; req.wstrb = 4'hF; req.wvalid = 1; req.bready = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk) begin req.awvalid = 0; req.wvalid = 0; end
    while (!rsp.bvalid) @(negedge clk);
    resp = rsp.bresp;
    @(posedge clk);
    @(negedge clk) req.bready = 0;
  endtask

  task automatic axil_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    req.araddr = a; req.arvalid = 1; req.rready = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk) req.arvalid = 0;
    while (!rsp.rvalid) @(negedge clk);
    d = rsp.rdata; resp = rsp.rresp;
    @(posedge clk);
    @(negedge clk) req.rready = 0;
  endtask

  bit got[$];
  logic cclk_q = 0;
  always @(posedge clk) begin
    cclk_q <= cclk;
    if (!rst && cclk && !cclk_q) got.push_back(din);
  end

  initial begin
    logic [31:0] d; logic [1:0] r;
    for (int s = 0; s < NS; s++) begin
      txc[s] = 32'h1000 + s; rtc[s] = 32'h2000 + s; crc[s] = 32'h3000 + s; syn[s] = 32'h4000 + s;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    check(program_b == '1 && !card_rst && !mstr_rst, "reset values");
    axil_write(32'h43FF_F000, 32'h0000_0053, r);   // card reset, PROG slots 0 and 2
    check(r == RESP_OKAY, "ctrl write okay");
    check(card_rst && mstr_rst && program_b == 4'b1010, "ctrl bits");
    axil_read(32'h43FF_F000, d, r);
    check(d == 32'h53 && r == RESP_OKAY, "ctrl readback");
    axil_write(32'h43FF_F000, 32'h0, r);
    check(!card_rst && !mstr_rst && program_b == 4'b1111, "ctrl cleared");
    locked = 4'b0110; init_b = 0; done = 1;
    axil_read(32'h43FF_F004, d, r);
    check(d[3:0] == 4'b0110 && d[8] == 0 && d[9] == 1 && d[10] == 0, "status");
    for (int s = 0; s < NS; s++) begin
      axil_read(32'h43FF_F010 + 16*s, d, r); check(d == 32'h1000 + s, "tx count");
      axil_read(32'h43FF_F014 + 16*s, d, r); check(d == 32'h2000 + s, "retx count");
      axil_read(32'h43FF_F018 + 16*s, d, r); check(d == 32'h3000 + s, "crc errors");
      axil_read(32'h43FF_F01C + 16*s, d, r); check(d == 32'h4000 + s, "sync errors");
    end
    axil_read(32'h43FF_F800, d, r);
    check(r == RESP_SLVERR, "unmapped read slverr");
    axil_write(32'h43FF_F900, 32'h1, r);
    check(r == RESP_SLVERR, "unmapped write slverr");
    axil_write(32'h43FF_F008, 32'hC3A5_0F96, r);
    axil_write(32'h43FF_F008, 32'h1234_5678, r);
    axil_read(32'h43FF_F004, d, r);
    check(d[10] == 1, "queue busy");
    repeat (400) @(negedge clk);
    check(got.size() == 64, "64 bits clocked");
    if (got.size() == 64) begin
      logic [63:0] v;
      foreach (got[i]) v[63 - i] = got[i];
      check(v == 64'hC3A5_0F96_1234_5678, "bitstream bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

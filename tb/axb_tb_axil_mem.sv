// axb_tb_axil_mem: behavioural AXI4-Lite memory standing for an expansion
// card's register-mapped I/O functions.
//
// WORDS 32-bit words addressed by byte address bits [2 +: log2(WORDS)];
// WSTRB masks bytes. When STALL is set, every READY and VALID it drives
// is delayed by a random 0-3 cycles. Accesses at or above ERR_BASE answer
// SLVERR (and do not write). `irq_out` mirrors the low bits of word 0, so
// a testbench raises and clears card interrupts with ordinary writes.
// `accesses` counts completed transactions.
module axb_tb_axil_mem
  import axb_pkg::*;
#(
  parameter int unsigned WORDS    = 256,
  parameter bit          STALL    = 1'b0,
  parameter logic [31:0] ERR_BASE = 32'h0100_0000
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  req,
  output axil_rsp_t  rsp,
  output logic [7:0] irq_out,
  output int unsigned accesses
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  int unsigned wait_aw, wait_ar, wait_b, wait_r;
  logic        have_aw, have_w;
  logic [31:0] aw_addr, w_data;
  logic [3:0]  w_strb;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    accesses = 0;
  end

  assign irq_out = mem[0][7:0];

  function automatic int unsigned rnd_wait();
    return STALL ? ($urandom % 4) : 0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp     <= '0;
      have_aw <= 1'b0;
      have_w  <= 1'b0;
      wait_aw <= 0;
      wait_ar <= 0;
      wait_b  <= 0;
      wait_r  <= 0;
      aw_addr <= '0;
      w_data  <= '0;
      w_strb  <= '0;
    end else begin
      rsp.awready <= 1'b0;
      rsp.wready  <= 1'b0;
      rsp.arready <= 1'b0;
      // write address and data
      if (req.awvalid && !have_aw && !rsp.awready) begin
        if (wait_aw == 0) begin
          rsp.awready <= 1'b1;
          have_aw     <= 1'b1;
          aw_addr     <= req.awaddr;
          wait_aw     <= rnd_wait();
        end else wait_aw <= wait_aw - 1;
      end
      if (req.wvalid && !have_w && !rsp.wready) begin
        rsp.wready <= 1'b1;
        have_w     <= 1'b1;
        w_data     <= req.wdata;
        w_strb     <= req.wstrb;
      end
      if (have_aw && have_w && !rsp.bvalid) begin
        if (wait_b == 0) begin
          if (aw_addr >= ERR_BASE) begin
            rsp.bresp <= RESP_SLVERR;
          end else begin
            for (int i = 0; i < 4; i++)
              if (w_strb[i]) mem[aw_addr[2 +: AW]][8*i +: 8] <= w_data[8*i +: 8];
            rsp.bresp <= RESP_OKAY;
          end
          rsp.bvalid <= 1'b1;
          have_aw    <= 1'b0;
          have_w     <= 1'b0;
          wait_b     <= rnd_wait();
        end else wait_b <= wait_b - 1;
      end
      if (rsp.bvalid && req.bready) begin
        rsp.bvalid <= 1'b0;
        accesses   <= accesses + 1;
      end
      // read
      if (req.arvalid && !rsp.arready && !rsp.rvalid) begin
        if (wait_ar == 0) begin
          rsp.arready <= 1'b1;
          rsp.rdata   <= (req.araddr >= ERR_BASE) ? 32'h0 : mem[req.araddr[2 +: AW]];
          rsp.rresp   <= (req.araddr >= ERR_BASE) ? RESP_SLVERR : RESP_OKAY;
          wait_r      <= rnd_wait();
          wait_ar     <= rnd_wait();
        end else wait_ar <= wait_ar - 1;
      end
      if (rsp.arready) rsp.rvalid <= 1'b1;
      if (rsp.rvalid && req.rready) begin
        rsp.rvalid <= 1'b0;
        accesses   <= accesses + 1;
      end
    end
  end

endmodule

// axb_fifo: synchronous first-in first-out queue with valid/ready handshakes.
//
// The bridge keeps its packets in queues: requests wait in a transmission
// queue until the ARQ layer takes them, received packets wait in a receive
// queue until the AXI4-Lite front end consumes them. This is a plain
// register-array FIFO of DEPTH entries of type T. A word is written when
// in_valid && in_ready and read when out_valid && out_ready; both may
// happen in the same cycle. out_data shows the oldest entry while
// out_valid is high (first-word fall-through), so a word written in cycle
// n can be read in cycle n+1. The queue depths are not given by the
// protocol description; DEPTH defaults to 4.
module axb_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_wr, do_rd;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_data;
  end

  // a waiting head entry stays valid and unchanged until it is taken
  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule

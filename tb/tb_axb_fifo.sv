// tb_axb_fifo: random pushes and pops against a queue model; checks order,
// data, the full/empty handshakes, the count output and first-word
// fall-through (a word pushed is readable one cycle later).
module tb_axb_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int full_seen = 0;

  axb_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .count);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // fall-through: push one word, it must be visible right after
    @(negedge clk) begin in_valid = 1; in_data = 16'hA5A5; end
    @(negedge clk) in_valid = 0;
    check(out_valid && out_data == 16'hA5A5 && count == 1, "fall-through");
    @(negedge clk) out_ready = 1;
    @(negedge clk) out_ready = 0;
    check(!out_valid && count == 0, "empty after pop");
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check outputs against model before deciding
      check(out_valid == (model.size() != 0), "out_valid");
      check(in_ready == (model.size() != DEPTH), "in_ready");
      check(count == model.size(), "count");
      if (model.size() != 0) check(out_data == model[0], "data order");
      if (model.size() == DEPTH) full_seen++;
      in_valid  = ($urandom % 100) < (t < 1500 ? 70 : 30);
      in_data   = 16'($urandom);
      out_ready = ($urandom % 100) < (t < 1500 ? 30 : 70);
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_seen > 0, "queue reached full");
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

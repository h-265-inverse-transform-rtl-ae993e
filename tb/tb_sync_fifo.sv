// tb_sync_fifo - checks the valid/ready FIFO against a queue model.
//
// A DEPTH-8 FIFO is driven with random pushes and pops for 3000 clocks,
// with phases that fill it completely and drain it completely. Every word
// read must be the oldest one written, in_ready must be low exactly when
// 8 words are stored, out_valid low exactly when none are, and `count`
// must equal the model's fill level.
module tb_sync_fifo;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0, out_ready = 1'b0;
  logic        in_ready, out_valid;
  logic [15:0] in_data = '0, out_data;
  logic [3:0]  count;
  int checks = 0;
  int failures = 0;
  int fulls = 0, empties = 0;
  logic [15:0] model [$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.*);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      checks <= checks + 3;
      if (in_ready != (model.size() < 8) || out_valid != (model.size() > 0) || int'(count) != model.size()) begin
        failures <= failures + 1;
        $display("flags: ready %0d valid %0d count %0d, model holds %0d", in_ready, out_valid, count, model.size());
      end
      if (out_valid && out_ready) begin
        if (out_data != model[0]) begin
          failures <= failures + 1;
          $display("read %h, expected %h", out_data, model[0]);
        end
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
      if (!in_ready) fulls <= fulls + 1;
      if (!out_valid) empties <= empties + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // phases: mostly pushing, mostly popping, random
      case ((i / 200) % 3)
        0: begin in_valid = ($urandom_range(0, 9) < 8); out_ready = ($urandom_range(0, 9) < 2); end
        1: begin in_valid = ($urandom_range(0, 9) < 2); out_ready = ($urandom_range(0, 9) < 8); end
        default: begin in_valid = $urandom_range(0, 1); out_ready = $urandom_range(0, 1); end
      endcase
      in_data = 16'($urandom);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("full (%0d) or empty (%0d) never reached", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

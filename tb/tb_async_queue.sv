// tb_async_queue: self-checking testbench of the dual-clock token queue.
//
// Write and read clocks are two independently gated copies of one source
// clock, each stopped at random, as an actor's clock is under clock gating.
// The producer writes random tokens whenever full is low and it chooses to;
// the consumer reads whenever empty is low and it chooses to. A reference
// queue checks order and values; after every source edge full, almost_full
// (at most one free slot), empty and count are compared with the reference
// fill level. Phases with a fast producer and a slow consumer and the reverse
// make the queue fill up and run dry.
module tb_async_queue;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0;
  logic rst;
  logic wen_l, ren_l, wen, ren;
  logic wclk, rclk;
  logic wr, rd;
  logic [WIDTH-1:0] wdata, rdata;
  logic full, almost_full, empty;
  logic [$clog2(DEPTH):0] count;
  int   checks = 0, failures = 0;
  int   n_full = 0, n_afull = 0, n_empty = 0, n_words = 0;
  int   wprob = 50, rprob = 50;

  async_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .rst(rst), .wclk(wclk), .wclk_src(clk), .wr(wr), .wdata(wdata), .full(full),
    .almost_full(almost_full), .rclk(rclk), .rd(rd), .rdata(rdata),
    .empty(empty), .count(count)
  );

  always #5 clk = ~clk;

  // Glitch-free gating of the two clocks (enables latched while clk is low).
  always_latch if (!clk) begin wen_l = wen; ren_l = ren; end
  assign wclk = clk & wen_l;
  assign rclk = clk & ren_l;

  logic [WIDTH-1:0] model [$];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; #1;
    rst = 1'b1; wen = 1'b1; ren = 1'b1; wr = 1'b0; rd = 1'b0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // Phase selects the producer / consumer speeds.
      case ((cyc / 500) % 3)
        0: begin wprob = 90; rprob = 30; end
        1: begin wprob = 30; rprob = 90; end
        default: begin wprob = 60; rprob = 60; end
      endcase
      // Drive at the negative edge, for the next rising edge.
      wen   = $urandom_range(0, 99) < 85;
      ren   = $urandom_range(0, 99) < 85;
      wr    = !full && ($urandom_range(0, 99) < wprob);
      rd    = !empty && ($urandom_range(0, 99) < rprob);
      wdata = $urandom();
      // Reference: the operation happens only if the gated clock pulses.
      if (rd && ren) begin
        checks++;
        if (rdata !== model[0]) begin
          failures++;
          $display("FAIL t=%0t read %h expected %h", $time, rdata, model[0]);
        end
        void'(model.pop_front());
        n_words++;
      end
      if (wr && wen) model.push_back(wdata);
      @(negedge clk);
      checks++;
      if (full !== (model.size() == DEPTH) ||
          almost_full !== (model.size() >= DEPTH - 1) ||
          empty !== (model.size() == 0) ||
          int'(count) != model.size()) begin
        failures++;
        $display("FAIL t=%0t level %0d: full=%0b afull=%0b empty=%0b count=%0d",
                 $time, model.size(), full, almost_full, empty, count);
      end
      if (full) n_full++;
      if (almost_full && !full) n_afull++;
      if (empty) n_empty++;
    end
    checks++;
    if (n_full == 0 || n_afull == 0 || n_empty == 0 || n_words < 1000) begin
      failures++;
      $display("FAIL coverage full=%0d afull=%0d empty=%0d words=%0d", n_full, n_afull, n_empty, n_words);
    end
    $display("coverage: full=%0d almost_full=%0d empty=%0d words=%0d", n_full, n_afull, n_empty, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

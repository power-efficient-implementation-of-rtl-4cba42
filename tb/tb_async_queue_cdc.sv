// tb_async_queue_cdc: self-checking testbench of the token queue with
// unrelated write and read clocks (SYNC_STAGES = 2).
//
// The write source clock has a period of 8 time units, the read source clock
// a period of 12 with an offset, so their edges never coincide and drift
// against each other. Both are gated at random, as actor clocks are. A
// reference queue checks every token read for order and value. On every
// falling source edge the testbench checks that the flags are safe: full low only if
// there really is room, almost_full low only if two slots are free, count
// never below the true fill level, empty low only if a token is really there.
// Phases with a fast writer and a fast reader make the queue fill and run
// dry; at the end the reader drains it and every token written must arrive.
module tb_async_queue_cdc;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 16;

  logic wsrc = 1'b0, rsrc = 1'b0;
  logic rst;
  logic wen, ren, wen_l, ren_l, wclk, rclk;
  logic wr, rd;
  logic [WIDTH-1:0] wdata, rdata;
  logic full, almost_full, empty;
  logic [$clog2(DEPTH):0] count;
  int   checks = 0, failures = 0;
  int   n_full = 0, n_empty = 0, written = 0, readn = 0;
  int   wprob = 50, rprob = 50;
  bit   draining = 1'b0;

  async_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SYNC_STAGES(2)) dut (
    .rst(rst), .wclk(wclk), .wclk_src(wsrc), .wr(wr), .wdata(wdata), .full(full),
    .almost_full(almost_full), .rclk(rclk), .rd(rd), .rdata(rdata),
    .empty(empty), .count(count)
  );

  always #4 wsrc = ~wsrc;
  initial begin
    #1;
    forever #6 rsrc = ~rsrc;
  end

  always_latch if (!wsrc) wen_l = wen;
  always_latch if (!rsrc) ren_l = ren;
  assign wclk = wsrc & wen_l;
  assign rclk = rsrc & ren_l;

  logic [WIDTH-1:0] model [$];

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer: drives at the falling edge of its source clock.
  initial begin
    wen = 1'b1; wr = 1'b0; wdata = '0;
    @(posedge rst);
    @(negedge rst);
    forever begin
      @(negedge wsrc);
      wen   = $urandom_range(0, 99) < 85;
      wr    = !draining && !full && ($urandom_range(0, 99) < wprob);
      wdata = WIDTH'($urandom());
    end
  end

  always @(negedge wsrc) if (!rst) begin
    checks++;
    if ((!full && model.size() >= DEPTH) || (!almost_full && model.size() >= DEPTH - 1) ||
        int'(count) < model.size()) begin
      failures++;
      $display("FAIL t=%0t write side flags full=%0b afull=%0b count=%0d level=%0d",
               $time, full, almost_full, count, model.size());
    end
    if (full) n_full++;
  end

  always @(posedge wclk) if (!rst && wr && !full) begin
    model.push_back(wdata);
    written++;
  end

  // Reader: drives at the falling edge of its source clock.
  initial begin
    ren = 1'b1; rd = 1'b0;
    @(posedge rst);
    @(negedge rst);
    forever begin
      @(negedge rsrc);
      ren = $urandom_range(0, 99) < 85;
      rd  = !empty && ($urandom_range(0, 99) < rprob);
    end
  end

  always @(negedge rsrc) if (!rst) begin
    checks++;
    if (!empty && model.size() == 0) begin
      failures++;
      $display("FAIL t=%0t empty low with no token", $time);
    end
    if (empty) n_empty++;
  end

  always @(posedge rclk) if (!rst && rd && !empty) begin
    checks++;
    if (model.size() == 0 || rdata !== model[0]) begin
      failures++;
      $display("FAIL t=%0t read %h expected %h", $time, rdata, model.size() ? model[0] : '0);
    end
    if (model.size() != 0) void'(model.pop_front());
    readn++;
  end

  initial begin
    rst = 1'b0; #1;
    rst = 1'b1;
    #40;
    rst = 1'b0;
    for (int ph = 0; ph < 9; ph++) begin
      case (ph % 3)
        0: begin wprob = 90; rprob = 30; end
        1: begin wprob = 30; rprob = 90; end
        default: begin wprob = 60; rprob = 60; end
      endcase
      #8000;
    end
    draining = 1'b1;
    rprob = 100;
    #2000;
    checks++;
    if (model.size() != 0 || readn != written || !empty) begin
      failures++;
      $display("FAIL drain: written %0d read %0d left %0d", written, readn, model.size());
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || written < 1000) begin
      failures++;
      $display("FAIL coverage full=%0d empty=%0d written=%0d", n_full, n_empty, written);
    end
    $display("written=%0d read=%0d full seen=%0d empty seen=%0d", written, readn, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

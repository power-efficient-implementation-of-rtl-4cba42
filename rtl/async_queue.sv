// async_queue: order-preserving, lossless token queue with separate write and
// read clocks and full / almost-full outputs for clock gating.
//
// The producer writes on wclk (CLK W) and the consumer reads on rclk (CLK R);
// either clock may be stopped at any time by a clock enabler. Each side keeps
// its own pointer, one bit wider than the address, in a register of its own
// clock domain; the memory is written on wclk and read without a clock (first
// word fall through: rdata shows the oldest token whenever empty is low).
//
// full is high when DEPTH tokens are stored. almost_full is high when at most
// one free slot is left, so it is also high while full. empty is high when no
// token is stored. Two ways of deriving the flags, chosen by SYNC_STAGES:
//
//  * SYNC_STAGES = 0 (default): all clocks are gated copies of one source
//    clock. The flags are decoded from both pointers without a clock; both
//    pointers change right after the same source edges, so the flags settle
//    within a source period and are exact. count is the exact fill level.
//  * SYNC_STAGES >= 2: write and read clocks come from unrelated sources.
//    Each pointer is also kept in gray code and passed through SYNC_STAGES
//    flip-flops into the other side. full, almost_full and count are computed
//    on wclk_src, the free-running source of wclk, so that they keep following
//    the reader while wclk is stopped (a status clocked by the gated wclk would
//    never see a full queue drain). empty is computed on rclk. Both views lag
//    the other side by the synchronizer delay and are conservative: full and
//    almost_full may stay high, and empty may stay high, a few cycles longer
//    than the true fill level warrants, never the other way round.
//
// Interface: wr with wdata is taken on a rising wclk edge when full is low; rd
// on a rising rclk edge when empty is low removes the token shown on rdata.
// Writes when full and reads when empty are ignored and flagged by
// assertions. rst is asynchronous and active high. wclk_src is only used when
// SYNC_STAGES >= 2. Which mode to use, and the synchronizer, are this
// design's choices.
module async_queue #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned SYNC_STAGES = 0
) (
  input  logic                     rst,
  // write side (CLK W)
  input  logic                     wclk,
  input  logic                     wclk_src,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         wdata,
  output logic                     full,
  output logic                     almost_full,
  // read side (CLK R)
  input  logic                     rclk,
  input  logic                     rd,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  // fill level (write side view)
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr_q, rptr_q;
  logic             do_wr, do_rd;

  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr_q[AW-1:0]];

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wptr_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or posedge rst) begin
    if (rst)        wptr_q <= '0;
    else if (do_wr) wptr_q <= wptr_q + 1'b1;
  end

  always_ff @(posedge rclk or posedge rst) begin
    if (rst)        rptr_q <= '0;
    else if (do_rd) rptr_q <= rptr_q + 1'b1;
  end

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  if (SYNC_STAGES == 0) begin : g_same_source
    assign count       = wptr_q - rptr_q;
    assign full        = (count == (AW+1)'(DEPTH));
    assign almost_full = (count >= (AW+1)'(DEPTH - 1));
    assign empty       = (count == '0);
  end else begin : g_unrelated
    // Gray copies of the pointers, registered in their own domains so that
    // only one bit changes per step.
    logic [AW:0] wgray_q, rgray_q;
    logic [AW:0] rgray_sync [SYNC_STAGES];
    logic [AW:0] wgray_sync [SYNC_STAGES];
    logic [AW:0] rptr_w, wptr_r;

    always_ff @(posedge wclk or posedge rst) begin
      if (rst)        wgray_q <= '0;
      else if (do_wr) wgray_q <= bin2gray(wptr_q + 1'b1);
    end

    always_ff @(posedge rclk or posedge rst) begin
      if (rst)        rgray_q <= '0;
      else if (do_rd) rgray_q <= bin2gray(rptr_q + 1'b1);
    end

    // Read pointer into the free-running write source domain.
    always_ff @(posedge wclk_src or posedge rst) begin
      if (rst) begin
        for (int i = 0; i < int'(SYNC_STAGES); i++) rgray_sync[i] <= '0;
      end else begin
        rgray_sync[0] <= rgray_q;
        for (int i = 1; i < int'(SYNC_STAGES); i++) rgray_sync[i] <= rgray_sync[i-1];
      end
    end

    // Write pointer into the read domain.
    always_ff @(posedge rclk or posedge rst) begin
      if (rst) begin
        for (int i = 0; i < int'(SYNC_STAGES); i++) wgray_sync[i] <= '0;
      end else begin
        wgray_sync[0] <= wgray_q;
        for (int i = 1; i < int'(SYNC_STAGES); i++) wgray_sync[i] <= wgray_sync[i-1];
      end
    end

    assign rptr_w      = gray2bin(rgray_sync[SYNC_STAGES-1]);
    assign wptr_r      = gray2bin(wgray_sync[SYNC_STAGES-1]);
    assign count       = wptr_q - rptr_w;
    assign full        = (count == (AW+1)'(DEPTH));
    assign almost_full = (count >= (AW+1)'(DEPTH - 1));
    assign empty       = (wptr_r == rptr_q);
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_queue: DEPTH must be a power of two, at least 2");
    assert (SYNC_STAGES == 0 || SYNC_STAGES >= 2)
      else $error("async_queue: SYNC_STAGES must be 0 or at least 2");
  end

  a_no_overflow : assert property (@(posedge wclk) disable iff (rst) !(wr && full))
    else $error("async_queue: write while full");
  a_no_underflow : assert property (@(posedge rclk) disable iff (rst) !(rd && empty))
    else $error("async_queue: read while empty");

endmodule

// sample_buffer -- circulating double buffer for speech sampling.
//
// A 400-byte memory is split into two 200-byte halves (buffer A and B).
// Samples from the AD converter are written in a circle. Each time a half
// fills (every 200 samples) frame_ready pulses and the 256 most recent
// samples -- the last 56 of the other half plus the 200 of the half just
// filled -- form the analysis frame. A reader fetches frame sample j
// (0 = oldest) by driving rd_addr = j; rd_data follows one clock later.
// The frame base is latched at frame_ready, so the reader may go on while
// new samples arrive, as long as it finishes within 144 sample periods
// (after that the oldest frame samples are overwritten).
// The memory sizes follow the original coder design. Read latency, the
// frame_ready pulse and zero-filling of the 56 samples that precede the first
// 200 after reset are this design's choices.
module sample_buffer #(
  parameter int unsigned HOP   = 200,  // samples per half buffer
  parameter int unsigned FRAME = 256   // analysis frame length
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic signed [7:0] in_sample,
  output logic              frame_ready,   // one-cycle pulse
  input  logic [$clog2(FRAME)-1:0] rd_addr,
  output logic signed [7:0] rd_data
);
  localparam int unsigned DEPTH = 2 * HOP;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic signed [7:0] mem [DEPTH];
  logic [AW-1:0] wp;          // next write position
  logic [AW-1:0] base;        // position of frame sample 0
  logic [$clog2(HOP+1)-1:0] fill;
  logic          hop_seen;    // at least one hop has been collected
  logic          first_frame; // the current frame is the first after reset

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= in_sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; fill <= '0; base <= '0; frame_ready <= 1'b0;
      hop_seen <= 1'b0; first_frame <= 1'b1;
    end else begin
      frame_ready <= 1'b0;
      if (in_valid) begin
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (fill == $bits(fill)'(HOP - 1)) begin
          fill        <= '0;
          frame_ready <= 1'b1;
          hop_seen    <= 1'b1;
          first_frame <= !hop_seen;
          // frame sample 0 sits FRAME-1 places before the sample just written
          base <= AW'((int'(wp) + DEPTH - (FRAME - 1)) % DEPTH);
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

  // frame read port
  logic [AW:0] raddr_sum;
  logic [AW-1:0] raddr;
  assign raddr_sum = {1'b0, base} + (AW+1)'(rd_addr);
  assign raddr = (raddr_sum >= (AW+1)'(DEPTH)) ? AW'(raddr_sum - (AW+1)'(DEPTH)) : raddr_sum[AW-1:0];

  always_ff @(posedge clk) begin
    // before the first hop completed there is no older data: read zero
    if (first_frame && (int'(rd_addr) < FRAME - HOP)) rd_data <= '0;
    else                                          rd_data <= mem[raddr];
  end
endmodule

// vga_pattern: the projector side. Drives the VGA DAC with the N
// phase-shifted dual-frequency patterns, one per video frame, and tells the
// camera side when the sequence starts and when a new pattern is shown.
//
// Pattern n (n = 0 .. NPAT-1, advancing every frame) has, on visible line y,
// the grey value
//   gamma( S[(y - n*D/NPAT) mod D] + S[(FH*y - 2n*D/NPAT) mod D] )
// where S is the D-entry sine_rom table (one unit-frequency period over the
// visible lines). The first term is the unit-frequency sinusoid shifted by
// 2*pi*n/NPAT, the second the FH-times-higher sinusoid shifted by
// 4*pi*n/NPAT. All pixels of a line share the value. The two pointers
// advance by 1 and by FH at the end of each visible line; at the end of the
// last visible line they are loaded with the next pattern's offsets instead
// (all modulo D), so the table is read
// during horizontal blanking; the sum then passes the gamma table. r, g and
// b carry the same value (black while blanking), and the syncs are delayed
// by one clock to line up with it.
//
// Reset starts in vertical blanking with pattern 0 next, so the first
// frame after reset shows pattern 0 and is preceded by a VSYNC and trigger.
// proj_sync (registered, low in reset) is high during the frame showing
// pattern SYNC_PATTERN, by default pattern 0: its rising edge marks the
// start of a sequence, and a camera armed then whose readout follows its
// exposure delivers pattern 0 first. cam_trigger is
// a TRIG_WIDTH-clock pulse TRIG_DELAY clocks after each VSYNC rising edge,
// for a sensor in snapshot mode. The pattern construction follows the
// design; SYNC_PATTERN, TRIG_DELAY and TRIG_WIDTH are this design's choices.
module vga_pattern #(
  parameter int unsigned NPAT         = 8,
  parameter int unsigned FH           = 16,
  parameter int unsigned H_ACTIVE     = 800,
  parameter int unsigned H_FP         = 40,
  parameter int unsigned H_SYNC       = 128,
  parameter int unsigned H_BP         = 88,
  parameter int unsigned V_ACTIVE     = 600,
  parameter int unsigned V_FP         = 1,
  parameter int unsigned V_SYNC       = 4,
  parameter int unsigned V_BP         = 23,
  parameter int unsigned SYNC_PATTERN = 0,
  parameter int unsigned TRIG_DELAY   = 4000,
  parameter int unsigned TRIG_WIDTH   = 64
) (
  input  logic       clk,            // pixel clock
  input  logic       rst,
  output logic [7:0] red,
  output logic [7:0] green,
  output logic [7:0] blue,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic [$clog2(NPAT)-1:0] pattern,
  output logic       proj_sync,
  output logic       cam_trigger,
  input  logic       gamma_wr_en,
  input  logic [7:0] gamma_wr_addr,
  input  logic [7:0] gamma_wr_data
);
  localparam int unsigned D  = V_ACTIVE;
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned SHIFT = D / NPAT;

  logic [10:0] hcount, vcount;
  logic        hs, vs, bl, line_end, frame_end, vs_d;
  logic [AW-1:0] ptr_u, ptr_h;
  logic [7:0]  s_u, s_h, sum, gval;
  logic [$clog2(NPAT)-1:0] n;
  logic [$clog2(TRIG_DELAY+TRIG_WIDTH+1)-1:0] tcnt;
  logic        tact;

  function automatic logic [AW-1:0] off_u(input int k);
    return AW'((D - (k * SHIFT) % D) % D);
  endfunction
  function automatic logic [AW-1:0] off_h(input int k);
    return AW'((D - (2 * k * SHIFT) % D) % D);
  endfunction
  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] p, input int inc);
    int s;
    s = int'(p) + inc;
    return AW'((s >= int'(D)) ? s - int'(D) : s);
  endfunction

  vga_sync #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
             .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_sync (
    .clk, .rst, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank(bl),
    .line_end, .frame_end);

  sine_rom #(.DEPTH(D)) u_rom (.clk, .addr_a(ptr_u), .addr_b(ptr_h),
                               .data_a(s_u), .data_b(s_h));

  gamma_lut u_gamma (.clk, .addr(sum), .data(gval), .wr_en(gamma_wr_en),
                     .wr_addr(gamma_wr_addr), .wr_data(gamma_wr_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      n <= ($bits(n))'(NPAT - 1);       // the first frame after reset shows pattern 0
      ptr_u <= off_u(0);
      ptr_h <= off_h(0);
    end else begin
      if (frame_end) n <= (n == ($bits(n))'(NPAT - 1)) ? '0 : n + 1'b1;
      // pointers move at the end of each visible line; after the last one
      // they are loaded with the next pattern's offsets so the colour
      // pipeline is settled long before line 0 of the next frame
      if (hcount == 11'(H_ACTIVE - 1) && vcount == 11'(V_ACTIVE - 1)) begin
        ptr_u <= off_u((int'(n) + 1) % int'(NPAT));
        ptr_h <= off_h((int'(n) + 1) % int'(NPAT));
      end else if (hcount == 11'(H_ACTIVE - 1) && vcount < 11'(V_ACTIVE)) begin
        ptr_u <= wrap_add(ptr_u, 1);
        ptr_h <= wrap_add(ptr_h, int'(FH % D));
      end
    end
  end

  always_ff @(posedge clk) begin
    sum   <= s_u + s_h;
    red   <= bl ? 8'd0 : gval;
    green <= bl ? 8'd0 : gval;
    blue  <= bl ? 8'd0 : gval;
    hsync <= hs;
    vsync <= vs;
    blank <= bl;
  end

  assign pattern   = n;
  always_ff @(posedge clk) begin
    if (rst) proj_sync <= 1'b0;
    else     proj_sync <= (n == ($bits(n))'(SYNC_PATTERN));
  end

  // delayed camera trigger
  always_ff @(posedge clk) begin
    if (rst) begin
      vs_d <= 1'b0;  tact <= 1'b0;  tcnt <= '0;  cam_trigger <= 1'b0;
    end else begin
      vs_d <= vs;
      if (vs && !vs_d) begin
        tact <= 1'b1;
        tcnt <= '0;
      end else if (tact) begin
        tcnt <= tcnt + 1'b1;
        if (tcnt == ($bits(tcnt))'(TRIG_DELAY + TRIG_WIDTH - 1)) tact <= 1'b0;
      end
      cam_trigger <= tact && (tcnt >= ($bits(tcnt))'(TRIG_DELAY));
    end
  end

endmodule

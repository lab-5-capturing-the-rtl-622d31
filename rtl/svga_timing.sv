// svga_timing: SVGA/VGA raster timing generator.
//
// A pixel counter runs from 0 to H_TOTAL-1 and a line counter from 0 to V_TOTAL-1.
// Each line is laid out as active video, front porch, sync, back porch, and each
// frame likewise in lines. The blank and sync flags are registers that are set and
// cleared when the counters reach the boundaries of those regions, so they change
// on the same clock edge as the counters. BLANK is the OR of the horizontal and
// vertical blank flags and COMP_SYNC is held at zero, as the video DAC does not use
// it.
//
// Reset is asynchronous and active low. On reset every register is cleared except
// the line counter, which is loaded with V_TOTAL-33, and the vertical blank flag,
// which is set; the sync flags then first assert at the next region boundary. Both
// the reset values and the region order follow the lab specification; the choice of
// registered, edge-set flags is this design's.
//
// Interface: clk with a pixel enable pix_en (tie high when clk is the pixel clock;
// pulse once every N clocks to divide a faster clock). All outputs are active high.
// Timing: counters and flags advance one step on every clock with pix_en high.
// Defaults are the 720x480@60 live-video format (858 x 525 total).
module svga_timing #(
  parameter int unsigned H_ACTIVE      = 720,
  parameter int unsigned H_FRONT_PORCH = 7,
  parameter int unsigned H_SYNCH       = 62,
  parameter int unsigned H_BACK_PORCH  = 69,
  parameter int unsigned H_TOTAL       = 858,
  parameter int unsigned V_ACTIVE      = 487,
  parameter int unsigned V_FRONT_PORCH = 4,
  parameter int unsigned V_SYNCH       = 4,
  parameter int unsigned V_BACK_PORCH  = 30,
  parameter int unsigned V_TOTAL       = 525,
  parameter int unsigned V_RESET_OFFSET = 33,
  parameter int unsigned HC_W = $clog2(H_TOTAL),
  parameter int unsigned VC_W = $clog2(V_TOTAL)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pix_en,
  output logic [HC_W-1:0] pixel_count,
  output logic [VC_W-1:0] line_count,
  output logic            horiz_blank,
  output logic            vertical_blank,
  output logic            horiz_sync,
  output logic            vertical_sync,
  output logic            blank,
  output logic            comp_sync
);

  localparam logic [HC_W-1:0] H_LAST     = HC_W'(H_TOTAL - 1);
  localparam logic [HC_W-1:0] H_BLK_ON   = HC_W'(H_ACTIVE);
  localparam logic [HC_W-1:0] H_SYNC_ON  = HC_W'(H_ACTIVE + H_FRONT_PORCH);
  localparam logic [HC_W-1:0] H_SYNC_OFF = HC_W'(H_ACTIVE + H_FRONT_PORCH + H_SYNCH);
  localparam logic [VC_W-1:0] V_LAST     = VC_W'(V_TOTAL - 1);
  localparam logic [VC_W-1:0] V_BLK_ON   = VC_W'(V_ACTIVE);
  localparam logic [VC_W-1:0] V_SYNC_ON  = VC_W'(V_ACTIVE + V_FRONT_PORCH);
  localparam logic [VC_W-1:0] V_SYNC_OFF = VC_W'(V_ACTIVE + V_FRONT_PORCH + V_SYNCH);
  localparam logic [VC_W-1:0] V_INIT     = VC_W'(V_TOTAL - V_RESET_OFFSET);

  // The four regions must fill the line and the frame exactly.
  if (H_ACTIVE + H_FRONT_PORCH + H_SYNCH + H_BACK_PORCH != H_TOTAL) begin : g_chk_h
    $error("svga_timing: horizontal regions do not add up to H_TOTAL");
  end
  if (V_ACTIVE + V_FRONT_PORCH + V_SYNCH + V_BACK_PORCH != V_TOTAL) begin : g_chk_v
    $error("svga_timing: vertical regions do not add up to V_TOTAL");
  end

  logic [HC_W-1:0] pc_next;
  logic [VC_W-1:0] lc_next;
  logic            line_end;

  always_comb begin
    line_end = (pixel_count == H_LAST);
    pc_next  = line_end ? '0 : pixel_count + 1'b1;
    if (!line_end)              lc_next = line_count;
    else if (line_count == V_LAST) lc_next = '0;
    else                        lc_next = line_count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pixel_count    <= '0;
      line_count     <= V_INIT;
      horiz_blank    <= 1'b0;
      horiz_sync     <= 1'b0;
      vertical_blank <= 1'b1;
      vertical_sync  <= 1'b0;
    end else if (pix_en) begin
      pixel_count <= pc_next;
      line_count  <= lc_next;

      if (pc_next == H_BLK_ON)     horiz_blank <= 1'b1;
      else if (pc_next == '0)      horiz_blank <= 1'b0;

      if (pc_next == H_SYNC_ON)    horiz_sync <= 1'b1;
      else if (pc_next == H_SYNC_OFF) horiz_sync <= 1'b0;

      if (line_end) begin
        if (lc_next == V_BLK_ON)   vertical_blank <= 1'b1;
        else if (lc_next == '0)    vertical_blank <= 1'b0;

        if (lc_next == V_SYNC_ON)  vertical_sync <= 1'b1;
        else if (lc_next == V_SYNC_OFF) vertical_sync <= 1'b0;
      end
    end
  end

  assign blank     = horiz_blank | vertical_blank;
  assign comp_sync = 1'b0;

endmodule

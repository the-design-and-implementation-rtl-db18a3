// XVGA timing generator, 1024x768 at 60 Hz with a 65 MHz pixel clock.
//
// A line is 1344 pixel clocks: 1024 visible, front porch to 1047, sync
// pulse from 1048 to 1183, back porch to 1343. A frame is 806 lines: 768
// visible, sync during lines 777..782. Both syncs are active low. blank is
// high outside the visible area. The numbers are those of the original
// design; the synchronous reset is an addition.
//
// Timing: hcount/vcount give the pixel being generated; hsync, vsync and
// blank are registered and line up with them.
module xvga (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_VIS = 1024, H_SYNC_ON = 1047, H_SYNC_OFF = 1183, H_TOTAL = 1344;
  localparam int V_VIS = 768,  V_SYNC_ON = 776,  V_SYNC_OFF = 782,  V_TOTAL = 806;

  logic hblank, vblank;
  logic line_end, frame_end, hblank_n, vblank_n;

  assign line_end  = (hcount == 11'(H_TOTAL - 1));
  assign frame_end = line_end && (vcount == 10'(V_TOTAL - 1));
  assign hblank_n  = line_end ? 1'b0 : (hcount == 11'(H_VIS - 1)) ? 1'b1 : hblank;
  assign vblank_n  = frame_end ? 1'b0
                   : (line_end && vcount == 10'(V_VIS - 1)) ? 1'b1 : vblank;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hblank <= 1'b0;
      vblank <= 1'b0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= line_end ? '0 : hcount + 1'b1;
      if (line_end) vcount <= frame_end ? '0 : vcount + 1'b1;
      hblank <= hblank_n;
      vblank <= vblank_n;
      if (hcount == 11'(H_SYNC_ON))       hsync <= 1'b0;
      else if (hcount == 11'(H_SYNC_OFF)) hsync <= 1'b1;
      if (line_end && vcount == 10'(V_SYNC_ON))       vsync <= 1'b0;
      else if (line_end && vcount == 10'(V_SYNC_OFF)) vsync <= 1'b1;
      blank <= vblank_n | (hblank_n & ~line_end);
    end
  end
endmodule

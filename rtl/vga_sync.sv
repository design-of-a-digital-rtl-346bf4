// VGA synchronism generator: the line and frame timing of the raster.
//
// Two counters run on the pixel clock: `x` over the clocks of a line and `y`
// over the lines of a frame. Each period starts with its visible part and
// continues with front porch, sync pulse and back porch (a full period is
// H_DISP+H_FP+H_PW+H_BP clocks, V_DISP+V_FP+V_PW+V_BP lines). The sync
// outputs are active low. `de` is high while (x, y) is inside the visible
// picture; `frame_start` is high for the first pixel of each frame. All
// outputs are registered. The defaults are the standard 640 x 480 at 60 Hz
// timing for a 25 MHz pixel clock; the document shows the shape of the
// timing but gives no values.
module vga_sync
  import vga_pkg::*;
#(
  parameter int unsigned HD = H_DISP,
  parameter int unsigned HF = H_FP,
  parameter int unsigned HP = H_PW,
  parameter int unsigned HB = H_BP,
  parameter int unsigned VD = V_DISP,
  parameter int unsigned VF = V_FP,
  parameter int unsigned VP = V_PW,
  parameter int unsigned VB = V_BP,
  parameter int unsigned XW = $clog2(HD + HF + HP + HB),
  parameter int unsigned YW = $clog2(VD + VF + VP + VB)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          de,
  output logic          frame_start
);

  localparam int unsigned H_TOTAL = HD + HF + HP + HB;
  localparam int unsigned V_TOTAL = VD + VF + VP + VB;

  logic [XW-1:0] hc;
  logic [YW-1:0] vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == XW'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == YW'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x           <= '0;
      y           <= '0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      de          <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      x           <= hc;
      y           <= vc;
      hsync_n     <= !(hc >= XW'(HD + HF) && hc < XW'(HD + HF + HP));
      vsync_n     <= !(vc >= YW'(VD + VF) && vc < YW'(VD + VF + VP));
      de          <= (hc < XW'(HD)) && (vc < YW'(VD));
      frame_start <= (hc == '0) && (vc == '0);
    end
  end

endmodule

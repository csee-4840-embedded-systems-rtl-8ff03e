// chip8_vga: VGA scan-out of the 128x64 CHIP-8 display.
//
// Generates 640x480 at 60 Hz timing (800 x 525 pixel periods per frame) from
// a system clock twice the pixel rate: pix_en is high every second clock
// (25 MHz from 50 MHz). The 128x64 image is scaled by SCALE = 4 to 512x256
// and centred: 64 black columns on each side and 112 black lines above and
// below. Lit pixels are white, all else black. With display_enabled low the
// whole screen is black while the syncs keep running.
//
// Pixel lookup: on the clock after the counters advance, pix_x/pix_y name
// the framebuffer pixel under the beam; the framebuffer answers by the next
// clock, and on the following pix_en the colour, syncs and blanking for that
// position are registered together. All outputs therefore trail the
// counters by one pixel period, consistently. Syncs are active low.
//
// Scaling and centring for a normal monitor are the document's; the VGA
// mode, the factor 4 and the colours are this design's choices.
module chip8_vga #(
  parameter int SCALE  = 4,
  parameter int H_VIS  = 640,
  parameter int H_FP   = 16,
  parameter int H_SYNC = 96,
  parameter int H_BP   = 48,
  parameter int V_VIS  = 480,
  parameter int V_FP   = 10,
  parameter int V_SYNC = 2,
  parameter int V_BP   = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       display_enabled,
  output logic [6:0] pix_x,
  output logic [5:0] pix_y,
  input  logic       pix,
  output logic       pix_en,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int IMG_W = 128 * SCALE;
  localparam int IMG_H = 64 * SCALE;
  localparam int H_OFF = (H_VIS - IMG_W) / 2;
  localparam int V_OFF = (V_VIS - IMG_H) / 2;

  logic [10:0] hc, vc;
  logic [10:0] hx, vy;
  logic        in_img, visible, hs_n, vs_n;

  always_comb begin
    hx      = hc - 11'(H_OFF);
    vy      = vc - 11'(V_OFF);
    in_img  = (hc >= 11'(H_OFF)) && (hc < 11'(H_OFF + IMG_W)) &&
              (vc >= 11'(V_OFF)) && (vc < 11'(V_OFF + IMG_H));
    visible = (hc < 11'(H_VIS)) && (vc < 11'(V_VIS));
    hs_n    = !((hc >= 11'(H_VIS + H_FP)) && (hc < 11'(H_VIS + H_FP + H_SYNC)));
    vs_n    = !((vc >= 11'(V_VIS + V_FP)) && (vc < 11'(V_VIS + V_FP + V_SYNC)));
    pix_x   = 7'(hx / 11'(SCALE));
    pix_y   = 6'(vy / 11'(SCALE));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_en      <= 1'b0;
      hc          <= '0;
      vc          <= '0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else begin
      pix_en <= !pix_en;
      if (pix_en) begin
        vga_hs      <= hs_n;
        vga_vs      <= vs_n;
        vga_blank_n <= visible;
        vga_r       <= {8{in_img && display_enabled && pix}};
        vga_g       <= {8{in_img && display_enabled && pix}};
        vga_b       <= {8{in_img && display_enabled && pix}};
        if (hc == 11'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == 11'(V_TOT - 1)) ? '0 : vc + 1'b1;
        end else begin
          hc <= hc + 1'b1;
        end
      end
    end
  end

endmodule

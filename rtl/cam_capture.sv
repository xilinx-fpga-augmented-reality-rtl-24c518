// Camera capture: turns the raw pins of an 8-bit parallel camera into 16-bit
// RGB565 pixels in the 65 MHz system clock domain.
//
// The camera's pclk, href, vsync and data pins are each passed through two
// flip-flops, and a rising edge of the synchronised pclk marks a byte. While
// href is high, bytes pair up high byte first into one pixel, which is
// presented with a one-cycle pixel_valid_out strobe. A rising edge of vsync
// ends a frame and gives a one-cycle frame_done_out pulse. The outputs (a frame
// done flag, a pixel valid flag and 16 pixel bits) follow the source design;
// the pin set, the byte order and sampling pclk as data (so pclk must stay
// below roughly a third of the system clock) are this design's choices.
// Latency: a pixel appears four system cycles after the pclk edge of its
// second byte.
module cam_capture (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  output logic        pixel_valid_out,
  output logic [15:0] pixel_out,
  output logic        frame_done_out
);
  logic [1:0] pclk_s, href_s, vsync_s;
  logic [7:0] data_s1, data_s2;
  logic       pclk_q, vsync_q;
  logic       phase;                 // 1: high byte held, waiting for low byte
  logic [7:0] hi_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      pclk_s <= '0; href_s <= '0; vsync_s <= '0;
      data_s1 <= '0; data_s2 <= '0;
      pclk_q <= 1'b0; vsync_q <= 1'b0;
      phase <= 1'b0; hi_byte <= '0;
      pixel_valid_out <= 1'b0; pixel_out <= '0; frame_done_out <= 1'b0;
    end else begin
      pclk_s  <= {pclk_s[0], cam_pclk};
      href_s  <= {href_s[0], cam_href};
      vsync_s <= {vsync_s[0], cam_vsync};
      data_s1 <= cam_data;
      data_s2 <= data_s1;
      pclk_q  <= pclk_s[1];
      vsync_q <= vsync_s[1];

      pixel_valid_out <= 1'b0;
      frame_done_out  <= vsync_s[1] && !vsync_q;
      if (pclk_s[1] && !pclk_q) begin
        if (href_s[1]) begin
          if (!phase) begin
            hi_byte <= data_s2;
            phase   <= 1'b1;
          end else begin
            pixel_out       <= {hi_byte, data_s2};
            pixel_valid_out <= 1'b1;
            phase           <= 1'b0;
          end
        end else begin
          phase <= 1'b0;
        end
      end
    end
  end
endmodule

// tb_pixel_mux: all input combinations against the priority order
// text > missile > ship > alien > background, black when not visible.
module tb_pixel_mux;
  import space_shoot_pkg::*;
  int checks = 0, failures = 0;
  logic video_on, text_pix, missile_pix, ship_pix, alien_pix;
  rgb_t bg_rgb, rgb;
  pixel_mux dut (.video_on, .text_pix, .missile_pix, .ship_pix, .alien_pix, .bg_rgb, .rgb);
  initial begin
    for (int v = 0; v < 256; v++) begin
      rgb_t e;
      {video_on, text_pix, missile_pix, ship_pix, alien_pix, bg_rgb} = 8'(v);
      #1;
      e = !video_on ? 3'b000 : text_pix ? 3'b111 : missile_pix ? 3'b011 : ship_pix ? 3'b010 :
          alien_pix ? 3'b110 : bg_rgb;
      checks++;
      if (rgb != e) begin failures++; $display("FAIL %b -> %b", v[7:0], rgb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

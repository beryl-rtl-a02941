// tb_hdmi_controller: runs the pixel generator with a small screen (80x136
// visible, 100x142 total) so whole frames simulate quickly, feeding it a
// behavioural frame buffer whose pixel at address p is p[3:0] ^ p[7:4] (one
// cycle latency, like the real one). From its own pixel counters the
// testbench works out, for every cycle, the expected data enable, both
// active-low syncs and the 36-bit colour, and compares the outputs two
// cycles later: in pixel mode the colour map of the frame-buffer index, in
// text mode the glyph bits of the hex digits of the sixteen registers in the
// top-left 64x128 corner. It also counts visible pixels, sync lengths and
// the frame-start pulse per frame.
module tb_hdmi_controller;
  localparam int H = 80, V = 136, HT = 100, VT = 142, HFP = 4, HS = 6, VFP = 2, VS = 2;
  localparam int AW = $clog2(H * V);
  logic clk = 0, rst = 1;
  logic text_mode;
  logic [31:0] regs [16];
  logic [AW-1:0] fb_addr;
  logic [3:0] fb_pixel;
  logic [35:0] tx_data;
  logic tx_hs, tx_vs, tx_de, frame_start;
  logic [7:0] font [512];
  int checks = 0, failures = 0;

  hdmi_controller #(.H_RES(H), .V_RES(V), .H_TOTAL(HT), .V_TOTAL(VT), .H_FP(HFP), .H_SYNC(HS),
                    .V_FP(VFP), .V_SYNC(VS)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) fb_pixel <= fb_addr[3:0] ^ fb_addr[7:4];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // reference colour map: bit 3 adds a third of full scale to every channel,
  // bits 2/1/0 add two thirds to red/green/blue
  function automatic logic [35:0] ref_color(input logic [3:0] c);
    logic [11:0] r, g, b, base;
    base = c[3] ? 12'd1365 : 12'd0;
    r = (c[2] ? 12'd2730 : 12'd0) + base;
    g = (c[1] ? 12'd2730 : 12'd0) + base;
    b = (c[0] ? 12'd2730 : 12'd0) + base;
    return {r, g, b};
  endfunction

  function automatic logic [38:0] expected(input int k);   // {de, hs, vs, data}
    int x, y;
    logic de, hs, vs;
    logic [35:0] d;
    logic [3:0] dig;
    x = k % HT; y = (k / HT) % VT;
    de = x < H && y < V;
    hs = !(x >= H + HFP && x < H + HFP + HS);
    vs = !(y >= V + VFP && y < V + VFP + VS);
    d = '0;
    if (de) begin
      if (!text_mode) d = ref_color(4'((y * H + x) % 16) ^ 4'(((y * H + x) / 16) % 16));
      else if (x < 64 && y < 128) begin
        dig = regs[y / 8][4 * (7 - x / 8) +: 4];
        if (font[dig * 8 + y % 8][7 - x % 8]) d = '1;
      end
    end
    return {de, hs, vs, d};
  endfunction

  initial begin
    int n, de_cnt, hs_cnt, vs_cnt, fs_cnt, lit;
    fork begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    $readmemh("rtl/font_hex.mem", font);
    text_mode = 0;
    for (int r = 0; r < 16; r++) regs[r] = {$urandom};
    regs[0] = 32'h0123_4567; regs[1] = 32'h89AB_CDEF;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    n = 0;
    for (int f = 0; f < 4; f++) begin
      text_mode = (f >= 2);
      de_cnt = 0; hs_cnt = 0; vs_cnt = 0; fs_cnt = 0; lit = 0;
      for (int c = 0; c < HT * VT; c++) begin
        logic [38:0] e;
        @(posedge clk); n++;
        @(negedge clk);
        if (frame_start) begin fs_cnt++; chk(n % (HT * VT) == 0, "frame start at pixel (0,0)"); end
        if (n >= 2 && !(f == 2 && c < 4)) begin
          e = expected(n - 2);
          chk({tx_de, tx_hs, tx_vs} == e[38:36], "timing signals");
          chk(tx_data == e[35:0], "pixel data");
        end
        de_cnt += tx_de; hs_cnt += !tx_hs; vs_cnt += !tx_vs; lit += (tx_data == '1);
      end
      chk(de_cnt == H * V, $sformatf("visible pixels per frame %0d", de_cnt));
      chk(hs_cnt == HS * VT, "hsync length");
      chk(vs_cnt == VS * HT, "vsync length");
      chk(fs_cnt == 1, "one frame start per frame");
      if (text_mode) chk(lit > 500, "text drawn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

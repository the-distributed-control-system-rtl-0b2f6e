// tb_video_display: fills the 16x32 video RAM with random characters through
// the CPU port, reads it back, then scans two whole frames with char_tick at a
// random rate and checks each delivered position and character against the
// raster order (32 columns, SCANS lines per row, 16 rows), plus hsync/vsync.
module tb_video_display;
  localparam int ROWS = 16, COLS = 32, SCANS = 12;
  logic clk = 0, rst_n = 0, cpu_we = 0, char_tick = 0;
  logic [8:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic scan_valid, hsync, vsync;
  logic [3:0] scan_row, scan_line;
  logic [4:0] scan_col;
  logic [7:0] scan_char;
  logic [7:0] model [ROWS*COLS];
  int checks = 0, failures = 0, n_h = 0, n_v = 0;

  video_display #(.ROWS(ROWS), .COLS(COLS), .SCANS(SCANS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < ROWS * COLS; a++) begin
      model[a] = 8'($urandom);
      @(negedge clk); cpu_addr = 9'(a); cpu_wdata = model[a]; cpu_we = 1;
    end
    @(negedge clk); cpu_we = 0;
    for (int a = 0; a < ROWS * COLS; a += 7) begin
      cpu_addr = 9'(a); #1; check(cpu_rdata == model[a], "CPU read-back");
    end
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < ROWS; r++)
        for (int l = 0; l < SCANS; l++)
          for (int c = 0; c < COLS; c++) begin
            @(negedge clk);
            char_tick = 1;
            @(negedge clk);
            char_tick = 0;
            check(scan_valid, "valid follows tick");
            check(scan_row == 4'(r) && scan_line == 4'(l) && scan_col == 5'(c), "scan position");
            check(scan_char == model[r * COLS + c], "character");
            check(hsync == (c == 0), "hsync");
            check(vsync == (c == 0 && l == 0 && r == 0), "vsync");
            if (hsync) n_h++;
            if (vsync) n_v++;
            @(negedge clk);
            check(!scan_valid, "valid is one clock");
            repeat ($urandom % 3) @(negedge clk);
          end
    check(n_v == 2 && n_h == 2 * ROWS * SCANS, "sync counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nmea_parser: feeds the parser NMEA sentences byte by byte: random GGA
// sentences (GP and GN talkers, both hemispheres), GGA with a wrong checksum,
// other sentence types (RMC, GSV) and a GGA cut short by CR/LF. After each
// sentence the stored record is compared with the values the sentence was
// built from; bad or foreign sentences must leave it unchanged.
module tb_nmea_parser;
  import tsync_pkg::*;
  import tb_nmea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] b = '0;
  logic bv = 1'b0;
  gps_info_t info, exp_info;
  logic iv, cerr;
  int checks = 0, failures = 0;
  int n_valid = 0, n_cerr = 0, exp_valid = 0, exp_cerr = 0;

  always #5 clk = ~clk;

  nmea_parser dut (.clk, .rst_n, .byte_i(b), .byte_valid_i(bv), .info_o(info),
                   .info_valid_o(iv), .cks_err_o(cerr));

  always @(posedge clk) if (rst_n) begin
    if (iv) n_valid++;
    if (cerr) n_cerr++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      b = s[i]; bv = 1'b1;
      @(negedge clk);
      bv = 1'b0;
      repeat (int'($urandom_range(0, 3))) @(negedge clk);
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic check_info(input string what);
    checks++;
    if (info !== exp_info) begin
      failures++;
      $display("%s: got %h", what, info);
      $display("%s: exp %h", what, exp_info);
    end
  endtask

  initial begin
    exp_info = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++) begin
      int sod, ld, lm, od, om, fix, sats;
      bit s_, w_;
      string talker;
      sod = int'($urandom_range(0, 86399));
      ld = int'($urandom_range(0, 89));  lm = int'($urandom_range(0, 599999));
      od = int'($urandom_range(0, 179)); om = int'($urandom_range(0, 599999));
      s_ = 1'($urandom); w_ = 1'($urandom);
      fix = int'($urandom_range(0, 2)); sats = int'($urandom_range(0, 12));
      talker = (k % 4 == 3) ? "GN" : "GP";
      unique case (k % 6)
        0, 1, 2: begin
          feed(gga(sod, ld, lm, s_, od, om, w_, fix, sats, 1'b0, talker));
          exp_valid++;
          exp_info.utc_bcd   = sod_bcd(sod);
          exp_info.utc_sod   = SOD_W'(sod);
          exp_info.lat_int   = 16'(to_bcd(ld * 100 + lm / 10000, 4));
          exp_info.lat_frac  = 16'(to_bcd(lm % 10000, 4));
          exp_info.lat_south = s_;
          exp_info.lon_int   = 20'(to_bcd(od * 100 + om / 10000, 5));
          exp_info.lon_frac  = 16'(to_bcd(om % 10000, 4));
          exp_info.lon_west  = w_;
          exp_info.fix       = 4'(fix);
          exp_info.sats      = 8'(to_bcd(sats, 2));
          check_info("good GGA");
        end
        3: begin
          feed(gga(sod, ld, lm, s_, od, om, w_, fix, sats, 1'b1, talker));
          exp_cerr++;
          check_info("bad checksum");
        end
        4: begin
          feed(wrap("GPRMC,123519.000,A,4807.0380,N,01131.0000,E,022.4,084.4,230394,003.1,W"));
          feed(wrap("GPGSV,3,1,11,03,03,111,00,04,15,270,00,06,01,010,00,13,06,292,00"));
          check_info("other sentences");
        end
        default: begin
          string s;
          s = gga(sod, ld, lm, s_, od, om, w_, fix, sats);
          feed({s.substr(0, 30), "\r\n"});
          check_info("cut sentence");
        end
      endcase
    end
    checks++;
    if (n_valid != exp_valid || n_cerr != exp_cerr) begin
      failures++; $display("valid %0d/%0d cks errors %0d/%0d", n_valid, exp_valid, n_cerr, exp_cerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ccb_gtu_tagger: drives the GTU clock line (20 clocks period), a
// Time-sync level one GTU long at random moments, and L1 triggers with random
// block configurations. The testbench counts GTU rising edges since the last
// edge at which Time-sync was high and checks every header: trigger GTU,
// first GTU = trigger GTU - position * step, block length, position, step.
// Triggers are placed mid-GTU so the synchroniser delay cannot blur them.
module tb_ccb_gtu_tagger;
  import tsync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gclk = 1'b0, tsync = 1'b0, l1 = 1'b0;
  logic [7:0] n_gtu = 8'd128, pos = 8'd64, step = 8'd1;
  ccb_hdr_t hdr;
  logic hv, wrap;
  logic [GTU_W-1:0] cnt;
  int checks = 0, failures = 0;
  int cyc = 0, ref_cnt = 0, n_hdr = 0, n_sync = 0;

  always #5 clk = ~clk;

  ccb_gtu_tagger dut (.clk, .rst_n, .gtu_clk_i(gclk), .time_sync_i(tsync), .l1_i(l1),
                      .cfg_n_gtu_i(n_gtu), .cfg_trig_pos_i(pos), .cfg_step_i(step),
                      .hdr_o(hdr), .hdr_valid_o(hv), .count_o(cnt), .wrap_o(wrap));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GTU line and Time-sync, changed together at GTU rising edges
  always @(negedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    gclk <= ((cyc + 1) % 20) >= 10;
    if ((cyc + 1) % 20 == 10) begin
      // reference: GTU edge with Time-sync high loads zero
      if (tsync) begin ref_cnt <= 0; n_sync++; end
      else ref_cnt <= ref_cnt + 1;
      tsync <= ($urandom_range(0, 60) == 0);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      int expc;
      repeat (int'($urandom_range(1, 20)) * 20) @(negedge clk);
      // cyc and ref_cnt change on falling edges: read them on a rising edge
      @(posedge clk);
      while (cyc % 20 != 16) @(posedge clk);
      n_gtu = 8'($urandom_range(1, 255));
      pos   = 8'($urandom_range(0, 255));
      step  = (k % 3 == 0) ? 8'd1 : ((k % 3 == 1) ? 8'd10 : 8'd100);
      expc  = ref_cnt;
      @(negedge clk);
      l1 = 1'b1;
      fork
        begin
          wait (hv);
          @(negedge clk);
        end
        begin
          repeat (8) @(negedge clk);
        end
      join_any
      disable fork;
      checks++;
      if (hdr.trig_gtu !== GTU_W'(expc) || hdr.first_gtu !== GTU_W'(expc - int'(pos) * int'(step)) ||
          hdr.n_gtu !== n_gtu || hdr.trig_pos !== pos || hdr.step !== step) begin
        failures++;
        $display("hdr %0d %0d %0d %0d %0d exp gtu %0d", hdr.trig_gtu, hdr.first_gtu, hdr.n_gtu,
                 hdr.trig_pos, hdr.step, expc);
      end else n_hdr++;
      l1 = 1'b0;
    end
    checks++;
    if (n_sync < 3 || n_hdr != 300 || wrap) begin failures++; $display("syncs %0d headers %0d", n_sync, n_hdr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

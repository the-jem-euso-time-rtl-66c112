// nmea_parser: extracts UTC time, position, fix quality and number of
// satellites from the NMEA-0183 GGA sentences sent by the GPS module, and
// keeps the last good set in a register bank for the rest of the CLK board.
//
// The parser works on one received byte per strobe. '$' starts a sentence:
// the running XOR checksum is cleared and the field index set to 0. Commas
// advance the field index. Field 0 must be a 5-character address ending in
// "GGA" (any talker, e.g. GP or GN). Digits of field 1 (hhmmss), 2 (latitude
// ddmm.mmmm), 3 (N/S), 4 (longitude dddmm.mmmm), 5 (E/W), 6 (fix) and 7
// (satellites) are collected into a shadow record as BCD; only the first four
// decimals of the minutes are kept. '*' ends the body and is followed by two
// hex digits; if they equal the XOR of all bytes between '$' and '*', the
// shadow record, plus the time converted to seconds of day, is copied to
// info_o and info_valid_o strobes for one clock. A wrong checksum strobes
// cks_err_o and leaves info_o unchanged. CR/LF or any other character where
// hex digits are expected abandons the sentence. Other sentence types are
// checked but not stored. Using GGA is this design's choice: it holds every
// item the CLK board has to store.
module nmea_parser
  import tsync_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] byte_i,
  input  logic       byte_valid_i,
  output gps_info_t  info_o,
  output logic       info_valid_o,
  output logic       cks_err_o
);

  typedef enum logic [1:0] {P_WAIT, P_BODY, P_CK1, P_CK2} pstate_e;
  pstate_e    state;
  logic [7:0] xsum;
  logic [3:0] field;
  logic [3:0] cpos;     // character position inside the field
  logic [2:0] fpos;     // decimals seen after '.'
  logic       frac;
  logic       is_gga;
  logic [3:0] ck_hi;
  gps_info_t  sh;       // shadow record

  logic       is_digit, is_hex;
  logic [3:0] dig, hexv;

  always_comb begin
    is_digit = (byte_i >= "0") && (byte_i <= "9");
    dig      = 4'(byte_i - "0");
    is_hex   = 1'b1;
    hexv     = dig;
    if (is_digit)                              hexv = dig;
    else if (byte_i >= "A" && byte_i <= "F")   hexv = 4'(byte_i - "A" + 8'd10);
    else if (byte_i >= "a" && byte_i <= "f")   hexv = 4'(byte_i - "a" + 8'd10);
    else                                       is_hex = 1'b0;
  end

  // Seconds of day from hhmmss in BCD.
  function automatic logic [SOD_W-1:0] bcd_to_sod(input logic [23:0] t);
    logic [SOD_W-1:0] h, m, s;
    h = SOD_W'(t[23:20]) * 10 + SOD_W'(t[19:16]);
    m = SOD_W'(t[15:12]) * 10 + SOD_W'(t[11:8]);
    s = SOD_W'(t[7:4])   * 10 + SOD_W'(t[3:0]);
    return h * 3600 + m * 60 + s;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= P_WAIT; xsum <= '0; field <= '0; cpos <= '0; fpos <= '0;
      frac <= 1'b0; is_gga <= 1'b0; ck_hi <= '0; sh <= '0;
      info_o <= '0; info_valid_o <= 1'b0; cks_err_o <= 1'b0;
    end else begin
      info_valid_o <= 1'b0;
      cks_err_o    <= 1'b0;
      if (byte_valid_i) begin
        if (byte_i == "$") begin
          state <= P_BODY; xsum <= '0; field <= '0; cpos <= '0; fpos <= '0;
          frac <= 1'b0; is_gga <= 1'b1; sh <= '0;
        end else begin
          unique case (state)
            P_WAIT: ;
            P_BODY: begin
              if (byte_i == "*") begin
                state <= P_CK1;
              end else if (byte_i == 8'h0D || byte_i == 8'h0A) begin
                state <= P_WAIT;
              end else begin
                xsum <= xsum ^ byte_i;
                if (byte_i == ",") begin
                  if (field == 4'd0 && cpos != 4'd5) is_gga <= 1'b0;
                  if (field != 4'hF) field <= field + 1'b1;
                  cpos <= '0; fpos <= '0; frac <= 1'b0;
                end else begin
                  if (cpos != 4'hF) cpos <= cpos + 1'b1;
                  if (byte_i == ".") frac <= 1'b1;
                  unique case (field)
                    4'd0: begin
                      if (cpos == 4'd2 && byte_i != "G") is_gga <= 1'b0;
                      if (cpos == 4'd3 && byte_i != "G") is_gga <= 1'b0;
                      if (cpos == 4'd4 && byte_i != "A") is_gga <= 1'b0;
                    end
                    4'd1: if (is_digit && !frac && cpos < 4'd6)
                            sh.utc_bcd <= {sh.utc_bcd[19:0], dig};
                    4'd2: if (is_digit) begin
                            if (!frac) sh.lat_int <= {sh.lat_int[11:0], dig};
                            else if (fpos < 3'd4) begin
                              sh.lat_frac[4*(3-fpos) +: 4] <= dig;
                              fpos <= fpos + 1'b1;
                            end
                          end
                    4'd3: if (byte_i == "S") sh.lat_south <= 1'b1;
                    4'd4: if (is_digit) begin
                            if (!frac) sh.lon_int <= {sh.lon_int[15:0], dig};
                            else if (fpos < 3'd4) begin
                              sh.lon_frac[4*(3-fpos) +: 4] <= dig;
                              fpos <= fpos + 1'b1;
                            end
                          end
                    4'd5: if (byte_i == "W") sh.lon_west <= 1'b1;
                    4'd6: if (is_digit) sh.fix <= dig;
                    4'd7: if (is_digit) sh.sats <= {sh.sats[3:0], dig};
                    default: ;
                  endcase
                end
              end
            end
            P_CK1: begin
              if (is_hex) begin ck_hi <= hexv; state <= P_CK2; end
              else state <= P_WAIT;
            end
            P_CK2: begin
              state <= P_WAIT;
              if (is_hex) begin
                if ({ck_hi, hexv} == xsum) begin
                  if (is_gga) begin
                    info_o         <= sh;
                    info_o.utc_sod <= bcd_to_sod(sh.utc_bcd);
                    info_valid_o   <= 1'b1;
                  end
                end else begin
                  cks_err_o <= 1'b1;
                end
              end
            end
            default: state <= P_WAIT;
          endcase
        end
      end
    end
  end

endmodule

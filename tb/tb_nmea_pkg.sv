// tb_nmea_pkg: helpers shared by the testbenches to build NMEA-0183 sentences.
// gga() formats a GGA sentence for a given UTC second of day and position,
// with the checksum worked out here as the XOR of the characters between '$'
// and '*'. A wrong checksum can be requested to test rejection.
package tb_nmea_pkg;

  function automatic logic [7:0] nmea_xor(input string body);
    logic [7:0] x = 8'h00;
    for (int i = 0; i < body.len(); i++) x ^= body[i];
    return x;
  endfunction

  function automatic string wrap(input string body, input bit bad_cks = 1'b0);
    logic [7:0] c = nmea_xor(body);
    if (bad_cks) c = c ^ 8'h5A;
    return $sformatf("$%s*%02X\r\n", body, c);
  endfunction

  // lat_mm4/lon_mm4: minutes * 10^4, e.g. 51.1234' -> 511234
  function automatic string gga(input int sod, input int lat_deg, input int lat_mm4, input bit south,
                                input int lon_deg, input int lon_mm4, input bit west,
                                input int fix, input int sats, input bit bad_cks = 1'b0,
                                input string talker = "GP");
    string body;
    body = $sformatf("%sGGA,%02d%02d%02d.000,%02d%02d.%04d,%s,%03d%02d.%04d,%s,%0d,%02d,1.0,120.5,M,45.0,M,,0000",
                     talker, sod / 3600, (sod / 60) % 60, sod % 60,
                     lat_deg, lat_mm4 / 10000, lat_mm4 % 10000, south ? "S" : "N",
                     lon_deg, lon_mm4 / 10000, lon_mm4 % 10000, west ? "W" : "E", fix, sats);
    return wrap(body, bad_cks);
  endfunction

  function automatic logic [23:0] sod_bcd(input int sod);
    int h = sod / 3600, m = (sod / 60) % 60, s = sod % 60;
    return {4'(h / 10), 4'(h % 10), 4'(m / 10), 4'(m % 10), 4'(s / 10), 4'(s % 10)};
  endfunction

  // Integer to BCD, n digits.
  function automatic logic [31:0] to_bcd(input int v, input int n);
    logic [31:0] r = '0;
    for (int i = 0; i < n; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

endpackage

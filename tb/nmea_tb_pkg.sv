// nmea_tb_pkg: test helpers that build the NMEA 0183 sentences a GPS
// receiver sends ($POLYT time, $GPGSA fix and satellites, $POLYP position
// with TDOP in field 16), with the standard checksum: the XOR of all
// characters between '$' and '*', written as two upper-case hex digits.
package nmea_tb_pkg;

  function automatic byte unsigned nmea_checksum(string body);
    byte unsigned x = 0;
    for (int i = 0; i < body.len(); i++) x ^= body[i];
    return x;
  endfunction

  function automatic string nmea_sentence(string body, bit corrupt = 0);
    byte unsigned cs = nmea_checksum(body);
    string h;
    if (corrupt) cs = cs ^ 8'h01;
    h = $sformatf("%02x", cs);
    return {"$", body, "*", h.toupper(), "\r\n"};
  endfunction

  function automatic string polyt(int hh, int mm, int ss, bit corrupt = 0);
    return nmea_sentence($sformatf("POLYT,%02d%02d%02d.00,031015,475200.00,1865,17,+123,-4,21", hh, mm, ss), corrupt);
  endfunction

  // fix 1..3 and nsats satellites (IDs 4, 5, ...) in the 12 satellite fields
  function automatic string gpgsa(int fix, int nsats, bit corrupt = 0);
    string s = $sformatf("GPGSA,A,%0d", fix);
    for (int i = 0; i < 12; i++)
      s = (i < nsats) ? {s, $sformatf(",%02d", i + 4)} : {s, ","};
    s = {s, ",2.5,1.3,2.1"};
    return nmea_sentence(s, corrupt);
  endfunction

  function automatic string polyp(int hh, int mm, int ss, string tdop, bit corrupt = 0);
    return nmea_sentence($sformatf({"POLYP,%02d%02d%02d.00,1859.80,N,09718.57,W,4100.0,G3,2.1,3.0,",
                                    "0.0,0.0,0.0,,0.9,1.2,%s,1,0,0"}, hh, mm, ss, tdop), corrupt);
  endfunction

endpackage

// nmea_s2p: the serial-to-parallel converter of the Clock card. It receives
// the RS232 strings of the GPS receiver and turns three NMEA 0183 sentences
// into parallel GPS time and receiver health:
//   $POLYT  field 1 = hhmmss.ss   -> UTC time (hours, minutes, seconds)
//   $GPGSA  field 2 = fix (1..3), fields 3..14 = satellites used
//   $POLYP  field TDOP_FIELD = TDOP, read as BCD dd.dd
// Each character between '$' and '*' is XORed into a running checksum that
// is compared with the two hex digits after '*'. Only a sentence whose
// checksum matches updates the outputs; it then pulses time_strobe,
// gsa_strobe or tdop_strobe one clock after the second checksum digit.
// A bad checksum, a bad hex digit, a '$' inside a sentence or an RS232
// framing error pulses nmea_err (error 4 of the timestamp).
// The document names the three sentences and what they carry; the field
// positions (taken from the common layout of these proprietary time and
// position sentences), the RS232 format and the BCD TDOP are this design's
// own reading.
module nmea_s2p
  import gtc_pkg::*;
#(
  parameter int CLKS_PER_BIT = 8333,  // 40 MHz / 4800 baud
  parameter int TDOP_FIELD   = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      rxd,          // synchronized RS232 line, idle high
  output gps_info_t info,
  output logic      time_strobe,  // new POLYT time accepted
  output logic      gsa_strobe,   // new GPGSA fix/satellites accepted
  output logic      tdop_strobe,  // new POLYP TDOP accepted
  output logic      nmea_err      // erroneous sentence or character
);
  typedef enum logic [1:0] {T_NONE, T_POLYT, T_GPGSA, T_POLYP} sent_e;
  typedef enum logic [1:0] {P_IDLE, P_BODY, P_CS1, P_CS2} pstate_e;

  logic [7:0] ch;
  logic       ch_valid, ch_ferr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd, .data(ch), .valid(ch_valid), .frame_err(ch_ferr)
  );

  pstate_e    pst;
  sent_e      stype;
  logic [39:0] idbuf;      // last five identifier characters
  logic [4:0] field;
  logic [4:0] cidx;
  logic       nonempty;
  logic [7:0] xsum;
  logic [3:0] cs_hi;
  // sentence being parsed
  bcd_t       t_hh10, t_hh1, t_mm10, t_mm1, t_ss10, t_ss1;
  logic [1:0] t_fix;
  logic [3:0] t_nsats;
  logic [7:0] t_int, t_frac;
  logic       t_dot;
  logic [1:0] t_fcnt;

  logic       is_digit, is_hex;
  logic [3:0] hexval;
  sent_e      id_type;

  always_comb begin
    is_digit = (ch >= "0") && (ch <= "9");
    is_hex   = is_digit || ((ch >= "A") && (ch <= "F"));
    hexval   = is_digit ? 4'(ch - "0") : 4'(ch - "A" + 8'd10);
    unique case (idbuf)
      "POLYT": id_type = T_POLYT;
      "GPGSA": id_type = T_GPGSA;
      "POLYP": id_type = T_POLYP;
      default: id_type = T_NONE;
    endcase
  end

  always_ff @(posedge clk) begin
    time_strobe <= 1'b0;
    gsa_strobe  <= 1'b0;
    tdop_strobe <= 1'b0;
    nmea_err    <= 1'b0;
    if (rst) begin
      pst      <= P_IDLE;
      stype    <= T_NONE;
      idbuf    <= '0;
      field    <= '0;
      cidx     <= '0;
      nonempty <= 1'b0;
      xsum     <= '0;
      cs_hi    <= '0;
      info     <= '0;
      {t_hh10, t_hh1, t_mm10, t_mm1, t_ss10, t_ss1} <= '0;
      t_fix    <= '0;
      t_nsats  <= '0;
      t_int    <= '0;
      t_frac   <= '0;
      t_dot    <= 1'b0;
      t_fcnt   <= '0;
    end else if (ch_ferr) begin
      nmea_err <= 1'b1;
      pst      <= P_IDLE;
    end else if (ch_valid) begin
      if (ch == "$") begin
        // start of a sentence (an unfinished one is an error)
        if (pst != P_IDLE) nmea_err <= 1'b1;
        pst      <= P_BODY;
        stype    <= T_NONE;
        idbuf    <= '0;
        field    <= '0;
        cidx     <= '0;
        nonempty <= 1'b0;
        xsum     <= '0;
        t_nsats  <= '0;
        t_int    <= '0;
        t_frac   <= '0;
        t_dot    <= 1'b0;
        t_fcnt   <= '0;
      end else begin
        unique case (pst)
          P_IDLE: ;  // CR, LF and noise between sentences
          P_BODY: begin
            if (ch == "*") begin
              pst <= P_CS1;
              if (stype == T_GPGSA && field >= 5'd3 && field <= 5'd14 && nonempty
                  && t_nsats != 4'd15)
                t_nsats <= t_nsats + 1'b1;
            end else begin
              xsum <= xsum ^ ch;
              if (ch == ",") begin
                if (field == 5'd0) stype <= id_type;
                if (stype == T_GPGSA && field >= 5'd3 && field <= 5'd14 && nonempty
                    && t_nsats != 4'd15)
                  t_nsats <= t_nsats + 1'b1;
                if (field != 5'd31) field <= field + 1'b1;
                cidx     <= '0;
                nonempty <= 1'b0;
              end else begin
                nonempty <= 1'b1;
                if (cidx != 5'd31) cidx <= cidx + 1'b1;
                if (field == 5'd0) idbuf <= {idbuf[31:0], ch};
                // POLYT time hhmmss
                if (stype == T_POLYT && field == 5'd1 && is_digit) begin
                  unique case (cidx)
                    5'd0: t_hh10 <= ch[3:0];
                    5'd1: t_hh1  <= ch[3:0];
                    5'd2: t_mm10 <= ch[3:0];
                    5'd3: t_mm1  <= ch[3:0];
                    5'd4: t_ss10 <= ch[3:0];
                    5'd5: t_ss1  <= ch[3:0];
                    default: ;
                  endcase
                end
                // GPGSA fix mode
                if (stype == T_GPGSA && field == 5'd2 && is_digit)
                  t_fix <= (ch[3:0] > 4'd3) ? 2'd3 : ch[1:0];
                // POLYP TDOP
                if (stype == T_POLYP && field == 5'(TDOP_FIELD)) begin
                  if (ch == ".") t_dot <= 1'b1;
                  else if (is_digit && !t_dot) t_int <= {t_int[3:0], ch[3:0]};
                  else if (is_digit && t_dot) begin
                    if (t_fcnt == 2'd0) t_frac[7:4] <= ch[3:0];
                    if (t_fcnt == 2'd1) t_frac[3:0] <= ch[3:0];
                    if (t_fcnt != 2'd3) t_fcnt <= t_fcnt + 1'b1;
                  end
                end
              end
            end
          end
          P_CS1: begin
            if (is_hex) begin
              cs_hi <= hexval;
              pst   <= P_CS2;
            end else begin
              nmea_err <= 1'b1;
              pst      <= P_IDLE;
            end
          end
          P_CS2: begin
            pst <= P_IDLE;
            if (is_hex && {cs_hi, hexval} == xsum) begin
              unique case (stype)
                T_POLYT: begin
                  info.hh10 <= t_hh10; info.hh1 <= t_hh1;
                  info.mm10 <= t_mm10; info.mm1 <= t_mm1;
                  info.ss10 <= t_ss10; info.ss1 <= t_ss1;
                  time_strobe <= 1'b1;
                end
                T_GPGSA: begin
                  info.fix   <= t_fix;
                  info.nsats <= t_nsats;
                  gsa_strobe <= 1'b1;
                end
                T_POLYP: begin
                  info.tdop   <= {t_int, t_frac};
                  tdop_strobe <= 1'b1;
                end
                default: ;
              endcase
            end else begin
              nmea_err <= 1'b1;
            end
          end
          default: pst <= P_IDLE;
        endcase
      end
    end
  end
endmodule

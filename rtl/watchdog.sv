// WD_IF: watchdog and warm-reboot generator of the TWIB_CTL FPGA.
//
// A cycle counter runs while the watchdog is enabled (~WD_EN = 0) and is
// held at zero otherwise.  Software restarts it by writing ~WD_RST = 0.
// If it reaches the selected time-out, 7.78 s or, with ~WDTToSel = 0,
// 15.56 s, the ~WDTrip flag is set and a warm reboot starts: wrm_rst_n is
// driven low for WRM_LEN clocks, which resets the rest of the board and
// makes the boot controller copy the boot code again.  The same warm reboot
// is caused by a discrete reset request (dc_req, which also sets ~DC_Rst)
// and, for as long as it lasts, by the MON card's ~V_FAIL signal.
//
// The flags and the counter control bits are reset only by power-on reset
// (por_n), never by the warm reboot, so software can read after a reboot
// what caused it.  ~WDTripRst = 0 clears ~WDTrip and ~DC_Rst.
//
// Register interface (PMD[47:40] flag byte, one-cycle strobe):
//   stat = {~WDTrip, ~WD_EN, ~WDTToSel, ~V_Fail, ~DC_Rst, 0, 0, 0}
//   ctl_wr: bit 7 ~WDTripRst, bit 6 ~WD_EN, bit 5 ~WDTToSel, bit 4 ~WD_RST
//   (~WD_EN and ~WDTToSel are written on every control write).
// Time-outs are clock counts at 20 MHz (7.78 s = 155,600,000 clocks); the
// register map, reset values and trip sources follow the board description,
// while the warm reset pulse length is this design's own choice.
module watchdog #(
  parameter int unsigned TO_SHORT = 155_600_000,
  parameter int unsigned TO_LONG  = 311_200_000,
  parameter int unsigned WRM_LEN  = 16
) (
  input  logic       clk,
  input  logic       por_n,
  input  logic       ctl_wr,
  input  logic [7:0] ctl_wdata,
  output logic [7:0] stat,
  input  logic       v_fail_n,
  input  logic       dc_req,
  output logic       wrm_rst_n,
  output logic       wd_trip       // one-clock pulse on a counter time-out
);
  localparam int unsigned CW = $clog2(TO_LONG + 1);
  localparam int unsigned PW = $clog2(WRM_LEN + 1);

  logic          n_trip, n_en, n_tosel, n_dc;
  logic [CW-1:0] cnt;
  logic [PW-1:0] pulse;
  logic [1:0]    vf_s;

  always_ff @(posedge clk) begin
    if (!por_n) vf_s <= 2'b11;
    else        vf_s <= {vf_s[0], v_fail_n};
  end

  logic [CW-1:0] limit;
  assign limit   = n_tosel ? CW'(TO_SHORT) : CW'(TO_LONG);
  assign wd_trip = !n_en && (cnt >= limit - 1'b1) && wrm_rst_n;

  // flags: power-on reset only
  always_ff @(posedge clk) begin
    if (!por_n) begin
      n_trip <= 1'b1; n_en <= 1'b1; n_tosel <= 1'b1; n_dc <= 1'b1;
    end else begin
      if (ctl_wr) begin
        n_en    <= ctl_wdata[6];
        n_tosel <= ctl_wdata[5];
        if (!ctl_wdata[7]) begin
          n_trip <= 1'b1;
          n_dc   <= 1'b1;
        end
      end
      if (wd_trip) n_trip <= 1'b0;
      if (dc_req)  n_dc   <= 1'b0;
    end
  end

  // counter and warm reset pulse
  always_ff @(posedge clk) begin
    if (!por_n) begin
      cnt   <= '0;
      pulse <= '0;
    end else begin
      if (wd_trip || dc_req || !vf_s[1]) pulse <= PW'(WRM_LEN);
      else if (pulse != '0)              pulse <= pulse - 1'b1;

      if (n_en || !wrm_rst_n || wd_trip || (ctl_wr && !ctl_wdata[4]))
        cnt <= '0;
      else
        cnt <= cnt + 1'b1;
    end
  end

  assign wrm_rst_n = (pulse == '0);
  assign stat      = {n_trip, n_en, n_tosel, vf_s[1], n_dc, 3'b000};
endmodule

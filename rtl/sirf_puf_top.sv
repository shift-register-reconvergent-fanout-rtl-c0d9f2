// sirf_puf_top: the SiRF PUF, from the engineered path network to key bits.
//
// Structure:
//   sirf_netlist    launch FFs, 3 x 8 shift-register / reconvergent-fanout
//                   modules, 32-to-1 path MUX -> path_out
//   (carry chain)   outside: path_out goes out, the TAPS tap outputs come
//                   back in on cc_taps
//   sirf_tdc        thermometer FFs + decoder -> one delay sample
//   sirf_tdc_ctrl   launch / capture / restore sequence per sample
//   sirf_storage    averages 2^samples_log2 samples into a 16-bit DV
//   DV RAM          4096 DV (2048 rising paths, then 2048 falling)
//   sirf_dvdiff     2048 DVD = DV_R - DV_F, paired by two seeded LFSRs
//   sirf_gpevcal    DVD_c = (DVD - mean) / range * rc
//   sirf_spreadfactors  DVD_cr = +-(DVD_c - SF)
//   sirf_bitgen     threshold + XMR -> key bits and helper data
//   sirf_control    phase sequencer
//
// Host interface: the configuration vector and path select of DV index
// chal_idx are requested with chal_req and taken when chal_valid is high
// (they are latched, so the host may change them afterwards). SpreadFactor
// words ({flip, sf}) and, for regeneration, helper data are written into
// their RAMs through host_sf_* and host_hd_* while the PUF is idle. Key bits
// leave on key_valid/key_bit, helper data (enrollment) on hd_valid/hd_bit,
// in index order; done pulses at the end of the iteration. The user
// parameters (seeds, rc, threshold, xmr, samples_log2, mode) must stay
// stable while busy. rst_n also reloads every shift-register pattern.
// The netlist's disable is also held for the cycle a challenge is taken
// and the next one, so a challenge change cannot glitch a shift clock
// (this design's choice; the document does not discuss challenge loading).
module sirf_puf_top
  import sirf_pkg::*;
#(
  parameter int TAPS        = 2048,
  parameter int CAPTURE_DLY = 2,
  localparam int SW         = $clog2(TAPS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // run control and user parameters
  input  logic            start,
  input  bg_mode_t        mode,
  input  logic            do_timing,
  input  logic [10:0]     seed_r,
  input  logic [10:0]     seed_f,
  input  logic [11:0]     rc,
  input  logic [15:0]     threshold,
  input  logic [3:0]      xmr,
  input  logic [3:0]      samples_log2,
  // challenge (configuration vectors)
  output logic            chal_req,
  output logic [11:0]     chal_idx,
  input  logic            chal_valid,
  input  net_chal_t       chal,
  input  logic [4:0]      chal_path,
  // carry chain of the TDC
  output logic            path_out,
  input  logic [TAPS-1:0] cc_taps,
  // SpreadFactor and helper-data loading
  input  logic            host_sf_we,
  input  logic [10:0]     host_sf_addr,
  input  logic [16:0]     host_sf_wdata,
  input  logic            host_hd_we,
  input  logic [10:0]     host_hd_addr,
  input  logic            host_hd_wdata,
  // results
  output logic            key_valid,
  output logic            key_bit,
  output logic            hd_valid,
  output logic            hd_bit,
  output logic            busy,
  output logic            done
);

  logic init;
  assign init = ~rst_n;

  // ---------------- challenge register ----------------
  net_chal_t  chal_q;
  logic [4:0] path_q;
  logic       chal_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chal_q <= '0;
      path_q <= '0;
    end else if (chal_load) begin
      chal_q <= chal;
      path_q <= chal_path;
    end
  end

  // ---------------- netlist + TDC ----------------
  logic launch_set, launch_clr, sr_disable, capture;
  logic load_hold, net_disable;

  // The shift clocks are held low (disable) in the cycle a challenge is
  // taken and the cycle after: at rest every shift clock is 0 anyway, so
  // this changes nothing logically, but in silicon it keeps the direction
  // bits and addresses, which change at slightly different times, from
  // glitching a shift clock and rotating a register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_hold <= 1'b0;
    else        load_hold <= chal_load;
  end
  assign net_disable = sr_disable | chal_load | load_hold;
  logic meas_start;
  logic [SW-1:0] sample;
  logic sample_valid;

  sirf_netlist u_netlist (
    .clk, .init, .launch_set, .launch_clr, .sr_disable(net_disable),
    .chal(chal_q), .path_sel(path_q), .path_out
  );

  sirf_tdc #(.TAPS(TAPS)) u_tdc (
    .clk, .rst_n, .capture, .polarity(chal_q.rows[0].tdc), .taps(cc_taps),
    .sample, .sample_valid
  );

  sirf_tdc_ctrl #(.CAPTURE_DLY(CAPTURE_DLY)) u_tdc_ctrl (
    .clk, .rst_n, .start(meas_start), .samples_log2,
    .launch_set, .launch_clr, .sr_disable, .capture, .busy(), .done()
  );

  // ---------------- DV storage ----------------
  logic        dv_we, dv_done;
  logic [11:0] dv_waddr, dv_raddr;
  logic [15:0] dv_wdata, dv_rdata;

  sirf_storage #(.DV_W(DV_W), .FRAC(FRAC), .SW(SW), .AW(12)) u_storage (
    .clk, .rst_n, .start(meas_start), .idx(chal_idx), .samples_log2,
    .sample_valid, .sample, .we(dv_we), .waddr(dv_waddr), .wdata(dv_wdata),
    .done(dv_done)
  );

  sirf_ram #(.DEPTH(N_DV), .WIDTH(DV_W)) u_dv_ram (
    .clk, .we(dv_we), .waddr(dv_waddr), .wdata(dv_wdata),
    .raddr(dv_raddr), .rdata(dv_rdata)
  );

  // ---------------- Difference ----------------
  logic        diff_start, diff_done;
  logic        dvd_we;
  logic [10:0] dvd_waddr, dvd_raddr;
  logic [15:0] dvd_wdata, dvd_rdata;

  sirf_dvdiff u_dvdiff (
    .clk, .rst_n, .start(diff_start), .seed_r, .seed_f,
    .dv_raddr, .dv_rdata, .dvd_we, .dvd_waddr, .dvd_wdata,
    .busy(), .done(diff_done)
  );

  sirf_ram #(.DEPTH(N_DVD), .WIDTH(DV_W)) u_dvd_ram (
    .clk, .we(dvd_we), .waddr(dvd_waddr), .wdata(dvd_wdata),
    .raddr(dvd_raddr), .rdata(dvd_rdata)
  );

  // ---------------- GPEVCal ----------------
  logic        cal_start, cal_done;
  logic        dvc_we;
  logic [10:0] dvc_waddr, sf_raddr;
  logic [15:0] dvc_wdata, dvc_rdata;
  logic [16:0] sf_rdata;

  sirf_gpevcal u_gpevcal (
    .clk, .rst_n, .start(cal_start), .rc,
    .dvd_raddr, .dvd_rdata, .dvc_we, .dvc_waddr, .dvc_wdata,
    .busy(), .done(cal_done)
  );

  sirf_ram #(.DEPTH(N_DVD), .WIDTH(DV_W)) u_dvc_ram (
    .clk, .we(dvc_we), .waddr(dvc_waddr), .wdata(dvc_wdata),
    .raddr(sf_raddr), .rdata(dvc_rdata)
  );

  sirf_ram #(.DEPTH(N_DVD), .WIDTH(DV_W + 1)) u_sf_ram (
    .clk, .we(host_sf_we), .waddr(host_sf_addr), .wdata(host_sf_wdata),
    .raddr(sf_raddr), .rdata(sf_rdata)
  );

  // ---------------- SpreadFactors + BitGen ----------------
  logic        sfb_start, bg_done;
  logic        cr_valid, cr_last;
  logic [10:0] cr_idx;
  logic signed [15:0] cr;
  logic        bg_hd_we, bg_hd_wdata, hd_rdata;
  logic [10:0] bg_hd_waddr, hd_raddr;

  sirf_spreadfactors u_sf (
    .clk, .rst_n, .start(sfb_start), .raddr(sf_raddr),
    .dvc_rdata, .sf_rdata,
    .out_valid(cr_valid), .out_idx(cr_idx), .out_cr(cr), .out_last(cr_last),
    .busy(), .done()
  );

  sirf_bitgen u_bitgen (
    .clk, .rst_n, .start(sfb_start), .mode, .threshold, .xmr,
    .in_valid(cr_valid), .in_idx(cr_idx), .in_cr(cr), .in_last(cr_last),
    .hd_raddr, .hd_rdata,
    .hd_we(bg_hd_we), .hd_waddr(bg_hd_waddr), .hd_wdata(bg_hd_wdata),
    .key_valid, .key_bit, .hdo_valid(hd_valid), .hdo_bit(hd_bit),
    .done(bg_done)
  );

  sirf_ram #(.DEPTH(N_DVD), .WIDTH(1)) u_hd_ram (
    .clk,
    .we   (bg_hd_we | host_hd_we),
    .waddr(bg_hd_we ? bg_hd_waddr : host_hd_addr),
    .wdata(bg_hd_we ? bg_hd_wdata : host_hd_wdata),
    .raddr(hd_raddr), .rdata(hd_rdata)
  );

  // ---------------- control ----------------
  sirf_control #(.N_DV(N_DV)) u_control (
    .clk, .rst_n, .start, .do_timing,
    .chal_req, .chal_idx, .chal_valid, .chal_load,
    .meas_start, .dv_done,
    .diff_start, .diff_done, .cal_start, .cal_done,
    .sfb_start, .bg_done,
    .busy, .done
  );

endmodule

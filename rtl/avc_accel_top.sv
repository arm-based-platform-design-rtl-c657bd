// avc_accel_top: the accelerator logic module of the H.264/AVC decoding platform.
//
// The CPU, running the software part of the decoder (parsing, entropy
// decoding, prediction set-up), is the only AHB master; it reaches three
// accelerators through this module's AHB slave port:
//   0x0000-0x0FFF  deblocking filter accelerator (dbf_accel)
//   0x1000-0x1FFF  IQ-IDCT and reconstruction accelerator (iqidct_accel)
//   0x2000-0x2FFF  motion compensation interpolation accelerator (mc_accel)
// An address decoder selects the accelerator and returns its read data,
// ready and response. The IQ-IDCT accelerator's reconstruction output is
// wired straight into the deblocking accelerator's current-macroblock input,
// so a reconstructed macroblock reaches the filter without another bus
// transfer when the CPU selects that path; otherwise the CPU reads the
// reconstructed rows back and writes them to the filter itself.
// Interface: plain AHB-Lite slave signals (the bus of the platform, with the
// CPU and its memories outside), plus the filter's macroblock-done pulse,
// its current filtering mode and a pulse for each filtered edge row, for an
// interrupt controller or for observation.
// The three accelerators, the AHB connection and the direct reconstruction
// path follow the document; the address map is this design's choice.
// Lint reports HRESETn as used both synchronously and asynchronously: the
// submodules' assertions name it in their disable conditions, while every
// flop uses it only as an asynchronous reset.
module avc_accel_top
  import dbf_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  output logic        dbf_mb_done,
  output dbf_mode_e   dbf_mode,
  output logic        dbf_filt_event
);

  logic [2:0]        hsel;
  logic [2:0][31:0]  s_hrdata;
  logic [2:0]        s_hreadyout;
  logic [2:0][1:0]   s_hresp;

  logic  rec_valid, rec_ready;
  pix4_t rec_data;

  ahb_decoder #(.NS(3)) u_dec (
    .HCLK, .HRESETn, .HADDR, .HTRANS,
    .HSEL        (hsel),
    .S_HRDATA    (s_hrdata),
    .S_HREADYOUT (s_hreadyout),
    .S_HRESP     (s_hresp),
    .HRDATA, .HREADY, .HRESP
  );

  dbf_accel u_dbf (
    .HCLK, .HRESETn,
    .HSEL      (hsel[0]),
    .HADDR     (HADDR[11:0]),
    .HTRANS, .HWRITE, .HWDATA, .HREADY,
    .HRDATA    (s_hrdata[0]),
    .HREADYOUT (s_hreadyout[0]),
    .HRESP     (s_hresp[0]),
    .cur_valid (rec_valid),
    .cur_data  (rec_data),
    .cur_ready (rec_ready),
    .mb_done   (dbf_mb_done),
    .mode      (dbf_mode),
    .filt_event(dbf_filt_event)
  );

  iqidct_accel u_iq (
    .HCLK, .HRESETn,
    .HSEL      (hsel[1]),
    .HADDR     (HADDR[11:0]),
    .HTRANS, .HWRITE, .HWDATA, .HREADY,
    .HRDATA    (s_hrdata[1]),
    .HREADYOUT (s_hreadyout[1]),
    .HRESP     (s_hresp[1]),
    .rec_valid, .rec_data, .rec_ready
  );

  mc_accel u_mc (
    .HCLK, .HRESETn,
    .HSEL      (hsel[2]),
    .HADDR     (HADDR[11:0]),
    .HTRANS, .HWRITE, .HWDATA, .HREADY,
    .HRDATA    (s_hrdata[2]),
    .HREADYOUT (s_hreadyout[2]),
    .HRESP     (s_hresp[2])
  );

endmodule

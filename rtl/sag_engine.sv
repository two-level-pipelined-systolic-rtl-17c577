// sag_engine: the systolic array graphics engine, a row of N_PE identical
// processing elements (sag_pe) that together hold one display row.
//
// Instruction packets enter PE 0 on din/iin, one word per clock, and move
// towards PE N_PE-1, each PE taking a fixed number of clocks per word. PE k (not counting
// bypassed PEs) is pixel column k + 1 of the row, so an instruction with
// address X acts first on the (X+1)-th working PE. The video chain runs in
// the same direction with one register per PE: when the REF packet passes
// PE k it places that PE's pixel on the chain; the chain has as many
// registers per PE as REF takes clocks per PE less one, so the pixels of a
// row leave vout on consecutive clocks, left to right. REF packets must therefore be at least
// N_PE clocks apart; the gap is the row's blanking time. Instructions for a
// row are sent between the REF of the previous row and the REF that reads
// this row out; unused packet slots are filled with NOP.
//
// dout/iout/vout of the last PE are brought out so that engines can be
// cascaded into a longer row (vin/vin_vld feed the first PE's video input).
// bypass[k] takes a faulty PE k out of the row: it passes everything on
// unchanged and no longer counts as a pixel column.
//
// PE type: GROUP_Y = 1 (default) builds the row from the deeply pipelined
// PEs of the silicon prototype (sag_pe_gy: nine carry sections of 3, 5, 4,
// 3, 5, 4, 3, 5, 4 bits); on din and dout the bits of section j travel j
// clocks after bits 2..0 of the same word. With GROUP_Y = 0, GROUP_X = 1
// selects the two-level pipelined PE (sag_pe_gx: three 12-bit sections,
// bits 23..12 one clock and bits 35..24 two clocks after bits 11..0) and
// GROUP_X = 0 the unpipelined PE (sag_pe, unskewed words). All three
// behave identically otherwise.
//
// Latency, counted from the clock edge that loads REF's DDI word into PE 0,
// with k the physical index of a PE:
//   GROUP_Y = 1: tags take 4*N_PE clocks from iin to iout; the pixel of PE k
//                is on vout, with vout_vld, 3*N_PE + k + 6 clocks later;
//   sag_pe_gx:   tags 2*N_PE clocks; pixel N_PE + k + 2 clocks later;
//   sag_pe:      tags 2*N_PE clocks; pixel N_PE + k clocks later.
// Data sections follow their tags with the skew above.
//
// N_PE defaults to the nine PEs of the fabricated prototype.
module sag_engine
  import sag_pkg::*;
#(
  parameter int unsigned N_PE    = 9,
  parameter bit          GROUP_X = 1'b1,
  parameter bit          GROUP_Y = 1'b1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_PE-1:0] bypass,
  input  data_t           din,
  input  instr_t          iin,
  input  video_t          vin,
  input  logic            vin_vld,
  output data_t           dout,
  output instr_t          iout,
  output video_t          vout,
  output logic            vout_vld
);

  data_t  d_ch [N_PE+1];
  instr_t i_ch [N_PE+1];
  video_t v_ch [N_PE+1];
  logic   vv_ch[N_PE+1];

  assign d_ch[0]  = din;
  assign i_ch[0]  = iin;
  assign v_ch[0]  = vin;
  assign vv_ch[0] = vin_vld;

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    if (GROUP_Y) begin : g_gy
      sag_pe_gy u_pe (
        .clk     (clk),
        .rst     (rst),
        .bypass  (bypass[k]),
        .din     (d_ch[k]),
        .iin     (i_ch[k]),
        .vin     (v_ch[k]),
        .vin_vld (vv_ch[k]),
        .dout    (d_ch[k+1]),
        .iout    (i_ch[k+1]),
        .vout    (v_ch[k+1]),
        .vout_vld(vv_ch[k+1])
      );
    end else if (GROUP_X) begin : g_gx
      sag_pe_gx u_pe (
        .clk     (clk),
        .rst     (rst),
        .bypass  (bypass[k]),
        .din     (d_ch[k]),
        .iin     (i_ch[k]),
        .vin     (v_ch[k]),
        .vin_vld (vv_ch[k]),
        .dout    (d_ch[k+1]),
        .iout    (i_ch[k+1]),
        .vout    (v_ch[k+1]),
        .vout_vld(vv_ch[k+1])
      );
    end else begin : g_flat
      sag_pe u_pe (
        .clk     (clk),
        .rst     (rst),
        .bypass  (bypass[k]),
        .din     (d_ch[k]),
        .iin     (i_ch[k]),
        .vin     (v_ch[k]),
        .vin_vld (vv_ch[k]),
        .dout    (d_ch[k+1]),
        .iout    (i_ch[k+1]),
        .vout    (v_ch[k+1]),
        .vout_vld(vv_ch[k+1])
      );
    end
  end

  assign dout     = d_ch[N_PE];
  assign iout     = i_ch[N_PE];
  assign vout     = v_ch[N_PE];
  assign vout_vld = vv_ch[N_PE];

endmodule

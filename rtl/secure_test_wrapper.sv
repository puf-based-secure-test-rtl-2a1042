// IEEE 1500 style test wrapper around one crypto IP, with its scan chains
// locked unless the unlock signal is 1.
//
// Parts: a wrapper instruction register (WIR: shift stage plus update
// stage), a one-bit bypass register, an input wrapper boundary register
// (IWBR) whose update stage drives the core inputs in test mode, an output
// wrapper boundary register (OWBR) that captures the core outputs, and the
// output multiplexer that picks what reaches WSO. The serial paths are
//   WS_BYPASS      : WSI -> bypass -> WSO
//   WS_INTEST      : WSI -> IWBR -> OWBR -> WSO
//   WS_INTEST_SCAN : WSI -> IWBR -> chain 0 -> ... -> chain N_CHAINS-1
//                    -> OWBR -> WSO
// In WS_INTEST_SCAN the core's scan-enable, the data entering every scan
// chain and the data leaving the last one pass through gates controlled by
// unlock_i: while it is 0 the chains neither shift nor receive data, and
// the OWBR sees zeros in place of chain contents, so the scan path leaks
// nothing of the crypto core's state.
// Control follows the IEEE 1500 serial port: select_wir_i picks WIR or data
// register; shift_wr_i shifts by one bit per clock (data enters at the MSB,
// leaves at bit 0); capture_wr_i loads the OWBR from the core outputs and
// clears the bypass bit; update_wr_i copies the shift stage of the WIR or
// the IWBR into its update stage. All actions happen at the rising clock
// edge; WSO is combinational from the selected register's bit 0.
// Wrapper parts and unlock gating follow the published figure of the
// secure test wrapper; the instruction set and codes, the register sizes
// and chaining the scan chains into one serial path are this design's.
module secure_test_wrapper #(
  parameter int unsigned N_IN     = 8,
  parameter int unsigned N_OUT    = 8,
  parameter int unsigned N_CHAINS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                unlock_i,
  // wrapper serial port
  input  logic                wsi_i,
  output logic                wso_o,
  input  logic                select_wir_i,
  input  logic                shift_wr_i,
  input  logic                capture_wr_i,
  input  logic                update_wr_i,
  // functional side (rest of the SoC)
  input  logic [N_IN-1:0]     func_in_i,
  output logic [N_OUT-1:0]    func_out_o,
  // core side
  output logic [N_IN-1:0]     core_in_o,
  input  logic [N_OUT-1:0]    core_out_i,
  output logic                core_scan_en_o,
  output logic [N_CHAINS-1:0] core_si_o,
  input  logic [N_CHAINS-1:0] core_so_i
);

  import stw_pkg::*;

  logic [WIR_W-1:0] wir_sr;
  wir_instr_e       wir_q;
  logic             wby_q;
  logic [N_IN-1:0]  iwbr_sr, iwbr_upd;
  logic [N_OUT-1:0] owbr_sr;
  logic             test_mode, scan_mode, dr_shift, owbr_si;

  assign test_mode = (wir_q == WS_INTEST) || (wir_q == WS_INTEST_SCAN);
  assign scan_mode = (wir_q == WS_INTEST_SCAN);
  assign dr_shift  = shift_wr_i && !select_wir_i;

  // Scan chain access, gated by the unlock signal.
  assign core_scan_en_o = unlock_i && scan_mode && dr_shift;
  always_comb begin
    core_si_o = '0;
    if (unlock_i && scan_mode) begin
      core_si_o[0] = iwbr_sr[0];
      for (int unsigned k = 1; k < N_CHAINS; k++) core_si_o[k] = core_so_i[k-1];
    end
  end
  assign owbr_si = scan_mode ? (unlock_i && core_so_i[N_CHAINS-1]) : iwbr_sr[0];

  // Functional path, or the IWBR in test mode.
  assign core_in_o  = test_mode ? iwbr_upd : func_in_i;
  assign func_out_o = core_out_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wir_sr   <= WIR_W'(WS_BYPASS);
      wir_q    <= WS_BYPASS;
      wby_q    <= 1'b0;
      iwbr_sr  <= '0;
      iwbr_upd <= '0;
      owbr_sr  <= '0;
    end else begin
      if (select_wir_i) begin
        if (shift_wr_i)       wir_sr <= {wsi_i, wir_sr[WIR_W-1:1]};
        else if (update_wr_i) begin
          unique case (wir_sr)
            WIR_W'(WS_INTEST):      wir_q <= WS_INTEST;
            WIR_W'(WS_INTEST_SCAN): wir_q <= WS_INTEST_SCAN;
            default:                wir_q <= WS_BYPASS;
          endcase
        end
      end else if (!test_mode) begin
        if (shift_wr_i)        wby_q <= wsi_i;
        else if (capture_wr_i) wby_q <= 1'b0;
      end else begin
        if (shift_wr_i) begin
          iwbr_sr <= {wsi_i,   iwbr_sr[N_IN-1:1]};
          owbr_sr <= {owbr_si, owbr_sr[N_OUT-1:1]};
        end else if (capture_wr_i) begin
          owbr_sr <= core_out_i;
        end else if (update_wr_i) begin
          iwbr_upd <= iwbr_sr;
        end
      end
    end
  end

  always_comb begin
    if (select_wir_i)   wso_o = wir_sr[0];
    else if (test_mode) wso_o = owbr_sr[0];
    else                wso_o = wby_q;
  end

endmodule

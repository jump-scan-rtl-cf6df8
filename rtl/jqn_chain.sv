// jqn_chain: a jump-scan chain of J_QN-scan flip-flops (quiet-noisy scan).
//
// Same wiring as the J-scan chain: scan path (so of cell k -> si of cell
// k+1), jump path (jo of cell k -> ji of cell k+1), scan_in on both si and
// ji of the first cell, a dummy cell at the scan-in end when N_FF is odd,
// and Mux3 (so of the last cell while clk is low, jo while clk is high) on
// scan_out. A shared rst pin selects between the two scan modes:
//   rst=1, se=1  quiet scan: two bits per clock cycle, all dout held at 0,
//                so the circuit under test sees no toggling while shifting.
//   rst=0, se=1  noisy scan: one bit per clock cycle, dout = cell contents.
//   rst=0, se=0  function mode: capture di at the rising clock edge.
//   rst=1, se=0  reset: every negative latch loads 0 (hold scan_in at 0 to
//                clear the first positive latch too).
// A skew-load (launch-on-shift) two-pattern test is: N/2 cycles of quiet
// scan to load P1, one noisy-scan cycle that shifts P1 by one cell into P2
// (P1 shows on dout in its low phase, P2 after its rising edge), one
// function cycle to capture, then a quiet scan to unload. In the noisy mode
// jo and so of the last cell agree during the high phase, so Mux3 needs no
// mode input. Chain wiring and the test sequence follow the published
// technique; sharing one rst pin across the chain is this RTL's choice.
// An assertion checks that rst changes only in the low phase.
// The dummy cell's DO has nowhere to go, so lint reports that one bit of
// cell_do as unused; that is intended.
module jqn_chain #(
  parameter int unsigned N_FF = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            se,
  input  logic            scan_in,
  output logic            scan_out,
  input  logic [N_FF-1:0] di,
  output logic [N_FF-1:0] dout
);

  localparam int unsigned PAD = jscan_pkg::pad_cells(N_FF);
  localparam int unsigned NC  = jscan_pkg::num_cells(N_FF);

  logic [NC-1:0] cell_di, cell_si, cell_ji, cell_jo, cell_so, cell_do;

  for (genvar c = 0; c < NC; c++) begin : g_cell
    if (c < PAD) begin : g_dummy
      assign cell_di[c] = 1'b0;
    end else begin : g_ff
      assign cell_di[c]  = di[c-PAD];
      assign dout[c-PAD] = cell_do[c];
    end

    if (c == 0) begin : g_head
      assign cell_si[c] = scan_in;
      assign cell_ji[c] = scan_in;
    end else begin : g_link
      assign cell_si[c] = cell_so[c-1];  // scan path
      assign cell_ji[c] = cell_jo[c-1];  // jump path
    end

    jqn_dff u_dff (
      .clk  (clk),
      .rst  (rst),
      .se   (se),
      .di   (cell_di[c]),
      .si   (cell_si[c]),
      .ji   (cell_ji[c]),
      .jo   (cell_jo[c]),
      .so   (cell_so[c]),
      .do_o (cell_do[c])
    );
  end

  // Mux3: select SO of the last cell in the low phase, JO in the high phase.
  assign scan_out = clk ? cell_jo[NC-1] : cell_so[NC-1];

  // Mode rule: rst steers Mux2 of every cell, so it may change only while
  // clk is low and the positive latches are closed. A change during the high
  // phase would let the open latches take the other mux input.
  a_rst_in_low_phase: assert property (@(rst) clk == 1'b0)
    else $error("jqn_chain: rst changed while clk was high");

endmodule

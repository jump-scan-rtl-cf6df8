// jscan_chain: a jump-scan chain of J-scan flip-flops.
//
// Cells are numbered from the scan-in end. Neighbouring cells are joined by
// two wires: the scan path (q of cell k -> si of cell k+1) and the jump path
// (jo of cell k -> ji of cell k+1). scan_in drives both si and ji of the
// first cell. In scan mode (se = 1) every clock phase moves one bit one
// latch further, so a chain of N cells is loaded or unloaded in N/2 clock
// cycles, half the clock rate of a one-bit-per-cycle mux-scan chain for the
// same test time. Mux3 at the end picks q of the last cell while clk is low
// and jo of the last cell while clk is high, so scan_out presents one bit
// per clock phase, in the order the bits were held from the last cell
// backwards. Present scan_in during each phase; a bit applied in one phase
// is taken by the latch that closes at the end of that phase.
//
// The chain needs an even number of cells. When N_FF is odd, one dummy
// cell (functional input tied to 0, output unused) is placed at the
// scan-in end; the tester then shifts one extra padding bit last.
// di[i]/dout[i] are the functional input and output of flip-flop i,
// i = 0 nearest scan_in. In function mode (se = 0) each cell is a
// rising-edge flip-flop. The wiring, Mux3 and the dummy-cell rule follow
// the published chain; the default length of four is the published
// example.
module jscan_chain #(
  parameter int unsigned N_FF = 4
) (
  input  logic            clk,
  input  logic            se,
  input  logic            scan_in,
  output logic            scan_out,
  input  logic [N_FF-1:0] di,
  output logic [N_FF-1:0] dout
);

  localparam int unsigned PAD = jscan_pkg::pad_cells(N_FF);
  localparam int unsigned NC  = jscan_pkg::num_cells(N_FF);

  logic [NC-1:0] cell_di, cell_si, cell_ji, cell_jo, cell_q;

  for (genvar c = 0; c < NC; c++) begin : g_cell
    if (c < PAD) begin : g_dummy
      assign cell_di[c] = 1'b0;
    end else begin : g_ff
      assign cell_di[c]      = di[c-PAD];
      assign dout[c-PAD]     = cell_q[c];
    end

    if (c == 0) begin : g_head
      assign cell_si[c] = scan_in;
      assign cell_ji[c] = scan_in;
    end else begin : g_link
      assign cell_si[c] = cell_q[c-1];   // scan path
      assign cell_ji[c] = cell_jo[c-1];  // jump path
    end

    jscan_dff u_dff (
      .clk (clk),
      .se  (se),
      .di  (cell_di[c]),
      .si  (cell_si[c]),
      .ji  (cell_ji[c]),
      .jo  (cell_jo[c]),
      .q   (cell_q[c])
    );
  end

  // Mux3: select SO of the last cell in the low phase, JO in the high phase.
  assign scan_out = clk ? cell_jo[NC-1] : cell_q[NC-1];

endmodule

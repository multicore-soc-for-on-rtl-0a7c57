// rtc_cuc: real-time clock that keeps time in the CCSDS unsegmented time code
// (CUC): a binary count of seconds (coarse time, COARSE_OCTETS octets) and a
// binary fraction of a second (fine time, FINE_OCTETS octets, unit
// 2^-(8*FINE_OCTETS) s), so that telemetry can carry the value unchanged.
//
// How it works: a phase accumulator adds 2^(8*FINE_OCTETS) every clock cycle
// and subtracts CLK_HZ whenever it reaches it, advancing the fine count by
// one; the fine count carries into the coarse count. Over one second the fine
// count therefore steps exactly 2^(8*FINE_OCTETS) times, spread as evenly as
// the clock allows, and the coarse count steps once.
//
// APB slave (one wait-free transfer per access, pready always high), byte
// offsets:
//   0x00 PFIELD  read: the CUC preamble octet for this format,
//                {extension 0, time code id 3'b010 (agency-defined epoch),
//                 coarse octets - 1, fine octets}
//   0x04 COARSE  read: seconds; the read also captures the fine time that
//                goes with it. write: set the seconds, clear the fine time
//                and the accumulator
//   0x08 FINE    read: the fine time captured by the last COARSE read, in
//                the low 8*FINE_OCTETS bits
//   0x0C NOW     read: the live fine time (not captured)
// Offset bits other than [3:2] are ignored: the APB bridge decodes the slot.
// The read data is combinational from the registers during the access phase.
// The time code format is the platform's choice of standard; the octet counts,
// the epoch, the register map and the phase-accumulator fine clock are this
// design's own.
module rtc_cuc #(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned COARSE_OCTETS = 4,
  parameter int unsigned FINE_OCTETS   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // the time, for units that stamp data directly
  output logic [8*COARSE_OCTETS-1:0] coarse,
  output logic [8*FINE_OCTETS-1:0]   fine
);
  localparam int unsigned FW = 8 * FINE_OCTETS;
  localparam int unsigned CW = 8 * COARSE_OCTETS;
  localparam logic [39:0] STEP = 40'(1) << FW;
  localparam logic [7:0]  PFIELD = {1'b0, 3'b010, 2'(COARSE_OCTETS - 1), 2'(FINE_OCTETS)};

  logic [39:0]   acc;
  logic [FW-1:0] fine_cap;
  logic          wr, rd;

  assign wr = psel && penable && pwrite;
  assign rd = psel && penable && !pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      fine     <= '0;
      coarse   <= '0;
      fine_cap <= '0;
    end else if (wr && paddr[3:2] == 2'd1) begin
      coarse <= pwdata[CW-1:0];
      fine   <= '0;
      acc    <= '0;
    end else begin
      if (acc + STEP >= 40'(CLK_HZ)) begin
        acc  <= acc + STEP - 40'(CLK_HZ);
        fine <= fine + 1'b1;
        if (fine == '1) coarse <= coarse + 1'b1;
      end else begin
        acc <= acc + STEP;
      end
      if (rd && paddr[3:2] == 2'd1) fine_cap <= fine;
    end
  end

  always_comb begin
    case (paddr[3:2])
      2'd0:    prdata = 32'(PFIELD);
      2'd1:    prdata = 32'(coarse);
      2'd2:    prdata = 32'(fine_cap);
      default: prdata = 32'(fine);
    endcase
  end
  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  initial begin
    assert (FW <= 24 && CW <= 32 && CLK_HZ > 0) else $error("rtc_cuc: unsupported format");
  end
endmodule

// bram_scrubber: triplicated program memory that repairs its own upsets.
//
// The processor's program lives in block RAM, whose contents are as exposed
// to radiation as the rest of the configuration. Feedback TMR of the logic
// does not protect a memory's contents, so the memory is kept in three copies
// (prog_bram) and a dedicated scrubber uses their second ports:
//   * Port A serves instruction fetch. The three processor domains' fetch
//     addresses are voted onto the three port A's, and the three words read
//     are voted into the one instruction the processors see. One bad copy
//     therefore never reaches the processors.
//   * Port B is walked by an address counter that never stops. At each address
//     the three copies are read and voted; a copy that disagrees with the vote
//     is rewritten with the voted word by the write-back logic. An upset is
//     thus removed before a second upset at the same address can outvote the
//     good copy.
// Each address takes two clocks (read, then compare / write back), so a full
// pass over DEPTH words takes 2 * DEPTH clocks. repair pulses for one clock
// when a word is rewritten; pass_done pulses when the counter wraps.
//
// The three copies, the two voters, the address counter and the write-back
// logic are the document's structure. The two-clock step, the rewrite of only
// the disagreeing copies and the status outputs are this design's choices;
// the counter and write-back logic are not themselves triplicated.
module bram_scrubber #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned W         = 18,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] pb_address [3],  // fetch address of each processor domain
  output logic [W-1:0]  instruction,     // voted instruction word
  output logic          repair,          // a copy was rewritten this cycle
  output logic [15:0]   repair_count,    // rewrites since reset (saturating)
  output logic          pass_done        // the scrub counter wrapped this cycle
);
  logic [AW-1:0] a_addr;
  logic          a_mis;
  logic [W-1:0]  a_rdata [3];
  logic [W-1:0]  b_rdata [3];
  logic [W-1:0]  b_voted;
  logic          b_mis;
  logic          b_we    [3];

  logic [AW-1:0] scan_addr;
  logic          check;       // 0: address presented, 1: data valid, compare

  tmr_voter #(.W(AW)) u_addr_vote (
    .a(pb_address[0]), .b(pb_address[1]), .c(pb_address[2]), .y(a_addr), .mismatch(a_mis)
  );

  for (genvar i = 0; i < 3; i++) begin : g_copy
    prog_bram #(.DEPTH(DEPTH), .W(W), .INIT_FILE(INIT_FILE)) u_mem (
      .clk,
      .a_addr(a_addr), .a_rdata(a_rdata[i]),
      .b_we(b_we[i]), .b_addr(scan_addr), .b_wdata(b_voted), .b_rdata(b_rdata[i])
    );
    assign b_we[i] = check && (b_rdata[i] != b_voted);
  end

  logic unused_mis;
  tmr_voter #(.W(W)) u_fetch_vote (
    .a(a_rdata[0]), .b(a_rdata[1]), .c(a_rdata[2]), .y(instruction), .mismatch(unused_mis)
  );

  tmr_voter #(.W(W)) u_scrub_vote (
    .a(b_rdata[0]), .b(b_rdata[1]), .c(b_rdata[2]), .y(b_voted), .mismatch(b_mis)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      scan_addr    <= '0;
      check        <= 1'b0;
      repair_count <= '0;
    end else begin
      check <= !check;
      if (check) begin
        scan_addr <= scan_addr + 1'b1;
        if (b_mis && repair_count != 16'hFFFF) repair_count <= repair_count + 16'd1;
      end
    end
  end

  assign repair    = check && b_mis;
  assign pass_done = check && (scan_addr == AW'(DEPTH - 1));

endmodule

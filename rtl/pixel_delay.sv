// pixel_delay: a storage register of LEN pixel periods (LEN >= 1).
//
// It realises the pixel register T1 (LEN = 1), short chains of pixel
// registers, and the shortened line and frame registers T2 - (m2+q2) T1 and
// T3 - (m3+q3) T1 of the ladder structure.  dout(t) = din(t - LEN).
// Up to SHIFT_MAX pixels it is a chain of flip-flops; longer delays use a
// circular buffer of LEN-1 words read before write at one address, followed
// by an output register, so a line or frame store maps onto a single-port
// style memory.  The store starts empty: until it has been written once all
// the way round it reads as zero, which gives the filter its zero initial
// state without clearing the memory.  Only the flip-flops are reset.
module pixel_delay #(
  parameter int unsigned W         = ladder_pkg::DATA_W,
  parameter int unsigned LEN       = 1,
  parameter int unsigned SHIFT_MAX = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (LEN == 0) begin : g_bad
    $error("pixel_delay: LEN must be at least 1");
  end else if (LEN <= SHIFT_MAX) begin : g_shift
    logic [W-1:0] sr [LEN];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < int'(LEN); i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < int'(LEN); i++) sr[i] <= sr[i-1];
      end
    assign dout = sr[LEN-1];
  end else begin : g_ram
    localparam int unsigned DEPTH = LEN - 1;
    localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr;
    logic          filled;
    logic [W-1:0]  q;

    always_ff @(posedge clk) mem[ptr] <= din;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ptr    <= '0;
        filled <= 1'b0;
        q      <= '0;
      end else begin
        q <= filled ? mem[ptr] : '0;
        if (ptr == AW'(DEPTH - 1)) begin
          ptr    <= '0;
          filled <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    assign dout = q;
  end

endmodule

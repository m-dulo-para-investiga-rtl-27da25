// Local control display update machine (Moore).
//
// The processor writes the text it wants shown into LineTemp (LINES lines
// of CHARS characters). IDLE, entered on the asynchronous reset, watches
// for a difference (Dif) between LineTemp and the lines held for the
// display (Line). On a difference it moves to START_COUNT, where 'update'
// is high and Line is refreshed from LineTemp every clock, while a counter
// runs up to STOP (the time the display needs for the refresh); then it
// returns to IDLE, ready for the next change.
//
// Timing: 'line' and 'update' are registered. The display size and STOP are
// this design's choices.
module display_ctrl #(
  parameter int unsigned LINES = 4,
  parameter int unsigned CHARS = 16,
  parameter int unsigned STOP  = 1000
) (
  input  logic                       clk,
  input  logic                       rst_n,     // asynchronous, active low
  input  logic [LINES*CHARS*8-1:0]   line_tmp,
  output logic [LINES*CHARS*8-1:0]   line,
  output logic                       update
);
  typedef enum logic {S_IDLE, S_START_COUNT} state_e;
  state_e state;
  logic [$clog2(STOP+1)-1:0] count;
  logic dif;

  assign dif    = (line_tmp != line);
  assign update = (state == S_START_COUNT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      count <= '0;
      line  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (dif) begin
          state <= S_START_COUNT;
          count <= '0;
        end
        S_START_COUNT: begin
          line <= line_tmp;
          if (count == ($bits(count))'(STOP)) begin
            state <= S_IDLE;
            count <= '0;
          end else begin
            count <= count + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

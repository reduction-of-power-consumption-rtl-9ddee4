// Character-LCD writer that shows the decoded and the encoded word.
//
// Drives an HD44780-compatible 16x2 display over its 8-bit parallel bus
// (data, rs = register select, en = enable strobe; rw is assumed tied low on
// the board). After a power-on wait it sends the initialisation commands
//   0x38 function set, 0x0C display on, 0x06 entry mode, 0x01 clear
// with rs = 0, then refreshes forever:
//   line 1: "OUTPU=" followed by the W bits of dec_word, MSB first
//   line 2: "ENCOD=" followed by the W bits of enc_word, MSB first
// Characters are written with rs = 1. Both words are sampled when a refresh
// starts, so a line never mixes two words.
//
// Each byte write: rs/data set up for SETUP_CYC cycles with en low, en high
// for EN_CYC cycles, en low again, then a wait of CMD_WAIT_CYC cycles
// (CLR_WAIT_CYC after clear). Defaults assume a 50 MHz clock.
// From the source: the display contents (the two labelled binary words), the
// rs/en/data signals, rs = 0 while initialising and the 0x38 command. The
// remaining commands, the timing and the refresh order are this design's.
module lcd_ctrl #(
  parameter int unsigned W            = noc_coding_pkg::DEFAULT_W,
  parameter int unsigned PWRON_CYC    = 750_000,  // 15 ms
  parameter int unsigned SETUP_CYC    = 2,        // 40 ns
  parameter int unsigned EN_CYC       = 12,       // 240 ns
  parameter int unsigned CMD_WAIT_CYC = 2_000,    // 40 us
  parameter int unsigned CLR_WAIT_CYC = 82_000    // 1.64 ms
) (
  input  logic         clk,
  input  logic         rst,           // synchronous, active high
  input  logic [W-1:0] dec_word,      // shown on line 1
  input  logic [W-1:0] enc_word,      // shown on line 2
  output logic [7:0]   lcd_data,
  output logic         lcd_rs,
  output logic         lcd_en,
  output logic         frame_done     // one-cycle pulse after each refresh
);
  // HD44780 commands
  localparam logic [7:0] LCD_FUNC_SET = 8'h38;  // 8-bit bus, 2 lines, 5x8 font
  localparam logic [7:0] LCD_DISP_ON  = 8'h0C;  // display on, cursor off
  localparam logic [7:0] LCD_ENTRY    = 8'h06;  // increment address, no shift
  localparam logic [7:0] LCD_CLEAR    = 8'h01;  // clear display
  localparam logic [7:0] LCD_LINE1    = 8'h80;  // DDRAM address 0x00
  localparam logic [7:0] LCD_LINE2    = 8'hC0;  // DDRAM address 0x40

  localparam int unsigned N_INIT = 4;
  localparam int unsigned N_LINE = 7 + W;             // address + 6 label + W bits
  localparam int unsigned N_STEP = N_INIT + 2 * N_LINE;
  localparam int unsigned SW     = $clog2(N_STEP);
  localparam int unsigned MAXC   = (PWRON_CYC > CLR_WAIT_CYC) ? PWRON_CYC : CLR_WAIT_CYC;
  localparam int unsigned CNTW   = $clog2(MAXC + 1);

  typedef enum logic [1:0] {S_POWER, S_SETUP, S_PULSE, S_WAIT} state_e;

  state_e        state;
  logic [SW-1:0] step;
  logic [CNTW-1:0] cnt;
  logic [W-1:0]  dec_snap, enc_snap;

  // Byte and register select of one script step.
  logic [7:0] byte_c;
  logic       rs_c;

  function automatic logic [7:0] label_char(input logic line2, input int unsigned k);
    case (k)
      0: return line2 ? "E" : "O";
      1: return line2 ? "N" : "U";
      2: return line2 ? "C" : "T";
      3: return line2 ? "O" : "P";
      4: return line2 ? "D" : "U";
      default: return "=";
    endcase
  endfunction

  always_comb begin
    int unsigned r, k;
    logic        line2;
    r      = 0;
    k      = 0;
    line2  = 1'b0;
    byte_c = 8'h00;
    rs_c   = 1'b0;
    if (int'(step) < N_INIT) begin
      case (step)
        0:       byte_c = LCD_FUNC_SET;
        1:       byte_c = LCD_DISP_ON;
        2:       byte_c = LCD_ENTRY;
        default: byte_c = LCD_CLEAR;
      endcase
    end else begin
      r     = int'(step) - N_INIT;
      line2 = (r >= N_LINE);
      k     = line2 ? r - N_LINE : r;
      if (k == 0) begin
        byte_c = line2 ? LCD_LINE2 : LCD_LINE1;
      end else if (k <= 6) begin
        rs_c   = 1'b1;
        byte_c = label_char(line2, k - 1);
      end else begin
        rs_c   = 1'b1;
        byte_c = (line2 ? enc_snap[W-1-(k-7)] : dec_snap[W-1-(k-7)]) ? "1" : "0";
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_POWER;
      step       <= '0;
      cnt        <= CNTW'(PWRON_CYC);
      lcd_en     <= 1'b0;
      lcd_rs     <= 1'b0;
      lcd_data   <= 8'h00;
      dec_snap   <= '0;
      enc_snap   <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_POWER: begin
          if (cnt == 0) begin
            state <= S_SETUP;
            cnt   <= CNTW'(SETUP_CYC);
          end else cnt <= cnt - 1'b1;
        end
        S_SETUP: begin
          lcd_rs   <= rs_c;
          lcd_data <= byte_c;
          if (cnt == 0) begin
            state  <= S_PULSE;
            lcd_en <= 1'b1;
            cnt    <= CNTW'(EN_CYC - 1);
          end else cnt <= cnt - 1'b1;
        end
        S_PULSE: begin
          if (cnt == 0) begin
            state  <= S_WAIT;
            lcd_en <= 1'b0;
            cnt    <= (int'(step) == N_INIT - 1) ? CNTW'(CLR_WAIT_CYC) : CNTW'(CMD_WAIT_CYC);
          end else cnt <= cnt - 1'b1;
        end
        default: begin // S_WAIT
          if (cnt == 0) begin
            state <= S_SETUP;
            cnt   <= CNTW'(SETUP_CYC);
            if (int'(step) == N_STEP - 1) begin
              step       <= SW'(N_INIT);
              frame_done <= 1'b1;
            end else begin
              step <= step + 1'b1;
            end
            // Take a fresh copy of the words when a refresh begins.
            if (int'(step) == N_INIT - 1 || int'(step) == N_STEP - 1) begin
              dec_snap <= dec_word;
              enc_snap <= enc_word;
            end
          end else cnt <= cnt - 1'b1;
        end
      endcase
    end
  end

  initial assert (EN_CYC >= 1);
endmodule

# Laser-pointer Duck Hunt

This is a version of the Duck Hunt arcade game in SystemVerilog where the gun is a laser pointer.
A video camera watches the screen. The design finds the laser spot in each camera image and
turns its position into screen coordinates. Those coordinates move a red cursor dot over a
1024x768 VGA picture. A duck flies around the picture. Pulling the trigger (a push button)
while the dot is on the duck kills it and scores a point.

The design follows the MIT 6.111 project report "Optical Input Targeting Game". Its top module is
`duck_hunt_top`.

## Structure

Two halves meet at the cursor coordinates.

**Camera half.** Clocks: the 27 MHz decoder clock at the input, 65 MHz everywhere else.

| Module | Job |
|---|---|
| `ntsc_decoder` | Parses the BT.656 stream from the ADV7185 decoder chip into Y, Cr and Cb pixels, with field and blanking flags. |
| `fb_writer` | Packs four pixels into one 72-bit word and moves it into the 65 MHz domain through a toggle handshake. It writes the word into the frame buffer and retries in the next clock if the write is refused. The two interlaced fields fill alternate rows. |
| `frame_buffer` | 2^19 words of 72 bits with the two-clock read latency of the board's pair of ZBT SRAMs. Each word holds four luma bytes in one half and two Cr/Cb pairs in the other. The word address is `{row, column[10:2]}`. |
| `fb_arbiter` | Gives each clock to the display read first, then the writer, then the image scanner. |
| `fb_display` | Reads one word every fourth clock, so the raw camera picture (as grey) can replace the game on the screen (`show_camera`). |
| `fb_reader` | Scans pixels (0,0) to (719,459) whenever the memory is free. It stalls without losing pixels when the memory is taken. It flags the end of each scan with `new_frame`. |
| `pixel_analyzer` | Sums the image luminance; the top 8 bits of the sum serve as the "average". It keeps the brightest pixel above average + `threshold`. At each scan end it hands that pixel's position to `coord_scaler`. |
| `coord_scaler` | Maps 720x460 camera coordinates to 1024x768 screen coordinates through two look-up tables. |
| `ycrcb2hsv` | Six-stage pipeline from YCrCb to 10-bit RGB and 8-bit HSV. Division uses a 256/x table. It converts the scanned pixels; the result is brought out on `scan_rgb`/`scan_hsv`. |

**Game half.** Clock: 65 MHz pixel clock.

| Module | Job |
|---|---|
| `xvga` | Generates 1024x768 at 60 Hz timing. |
| `duck_hunt_game` | Moves the duck diagonally, PSPEED pixels per frame. The duck bounces off the sides, the top and the horizon line. Each frame it tests the debounced trigger against the duck's 30x30 square. It counts shots (three per duck), score bits, top bounces and ducks. It merges the sprite pixels: cursor first, then duck, then the OR of the rest. |
| `duck_sprite` | Three live frames, flipped every quarter second by `divider`. Two dead frames. Mirrored when flying left. |
| `stationary_sprite` | Bush and tree. |
| `score_sprite` | Four ducks, white for each duck hit. |
| `shot_sprite` | Three bullets, white for each shot left. |
| `sprite_rom` | Image memories for the sprites. |
| `look_up_table` | The 16-colour palette to 8-bit RGB. |
| `debouncer` | Cleans up the fire button. |

Shared constants, types and the sprite drawings are in `duck_hunt_pkg` and `video_pkg`.

Game rules as built:
- A miss uses a shot.
- A hit sets the duck's score bit. The dead duck falls to the horizon and a new duck starts.
- A duck that reaches the top edge after three top bounces flies away. Its score bit is cleared and a new duck starts.

## Sharing the frame buffer

This is the hardest part of the design to follow. Three clients use one single-ported memory.

**The memory.** `frame_buffer` registers the address, write flag and data. A write lands one clock
later. A read returns its word two clocks after the address was presented.

**The display.** `fb_display` asks for the memory in every clock where `hcount[1:0] == 0`.
- It fetches the word of the next four pixels: `{vcount, hcount[10:2] + 1}`.
- At the last group of a line it fetches word 0 of the next line instead.
- The word comes back in time to be parked. It is moved into the shift register that feeds the screen when the current group ends.
- The display therefore never waits, and its pixel is three clocks behind `hcount`.

**The writer.** `fb_writer` gets a new word only once every eight or more 65 MHz clocks. Each word holds four pixels at 13.5 Mpixel/s.
- The writer asserts `zbt_write_enable` and holds address and data until `write_failed` is low.
- A refused write always succeeds one clock later, because the display never asks in two clocks in a row.
- `write_completed` confirms each accepted write one clock later. An assertion checks this.

**The clock crossing.** It uses a hold register in the 27 MHz domain plus a toggle.
- The toggle passes through two flip-flops in the 65 MHz domain.
- A change of the synchronised toggle takes the held word.
- The held word stays stable for at least four 27 MHz clocks. That is ample time for the synchroniser.

**The reader.** `fb_reader` presents the address of its current pixel in every clock.
- `read_success` (= request, and neither of the others) advances it.
- A two-stage shift register carries `{valid, last, x, y}` alongside the memory latency. The returned word therefore leaves with its own coordinates.
- A clock lost to the display or the writer only makes a gap in `read_valid`. No pixel is skipped or repeated.
- `new_frame` marks the last pixel of a pass. The analyser latches its result there and starts the next average.

**The arbiter.** `fb_arbiter` is purely combinational apart from `write_completed`. An assertion checks that at most one client owns any clock.

## Top-level ports

| Port | Meaning |
|---|---|
| `clock_65mhz`, `reset` | System clock and synchronous reset. |
| `tv_clock`, `tv_in_ycrcb[9:0]` | The decoder chip's clock and pixel bus. |
| `fire_button_n` | Trigger, active low. |
| `threshold[7:0]` | Detection margin above the average brightness. |
| `show_camera` | Shows the camera picture instead of the game. |
| `vga_r/g/b[7:0]`, `vga_hsync`, `vga_vsync`, `vga_blank` | VGA output, four clocks behind the raster counters. |
| `cursor_x`, `cursor_y` | Cursor position. |
| `average_brightness` | Average brightness from the last scan. |
| `score`, `totalducks`, `bounces` | Game state. |
| `scan_rgb`, `scan_hsv`, `scan_valid` | Colour-converted scan stream. |

## Parameters

Top-level parameters and their defaults:
- `DIV_COUNT = 16,250,000`: a quarter second at 65 MHz, as in the report.
- `DEBOUNCE_DELAY = 650,000`: 10 ms.
- `PSPEED = 4`.

Other values the report does not give were chosen here:
- XGA porch timing (standard VESA values);
- sprite positions, except the score panel, whose position comes from the report's listing;
- the horizon (line 640) and the duck's start point (100, 600);
- the palette colours.

## Where this differs from the report, or goes beyond it

- **Sprite images.** The sprite bitmaps came from image files that are not available. The ROMs hold generated drawings of the same sizes: duck 30x30 (3 live frames and 2 dead frames), score 90x60, shots 60x30, bush, tree.
- **Frame buffer.** The two external ZBT SRAMs are modelled as an on-chip array with the same two-clock timing. On the board, `frame_buffer` would be replaced by the SRAM interface.
- **Decoder chip set-up.** The power-on register set-up of the ADV7185 is not built.
- **Colour sample order.** The report lists the colour samples as "Y Cr Y Cb". The decoder uses the standard BT.656 order Cb Y Cr Y.
- **Row count.** The report's scaling text gives the Y range as 0..450, but the scanner covers 460 rows. 460 is used for both.
- **Bus widths.** The writer's data bus is 72 bits (four pixels per word), matching the frame buffer, and addresses are 19 bits.
- **Shot.** A shot is evaluated at the start of the next frame. The duck does not move in that frame.
- **Fly-away rule.** The report describes it both as "more than three" bounces and as "bounces equal to three". It is built as: reaching the top with three bounces already counted.
- **After a hit.** The report both starts a new duck at once and lets the dead duck fall to the horizon first. The fall is built.
- **Detection.** It uses luminance only, which is what the report settled on. The colour converter runs alongside it, with its outputs brought out to pins.
- **Reader throughput.** The reader reads one word per pixel, so each word is read four times. A 720x460 scan still completes about 139 times a second against the 20 Hz the report asks for.
- **VGA output.** The palette look-up and the final output register sit in the top module, not in the VGA timing module as drawn in the report's game diagram.
- **Arbiter.** The arbitration is its own small module. In the report, the same rules are spread over the writer's and reader's handshake signals.

## Verification

Each module has a self-checking testbench in `tb/` with random stimulus and a watchdog.
`tb_bt656_source` models the decoder chip's output: a textured scene with a movable bright spot.

- `tb_duck_hunt_top` runs the whole design end to end. It feeds full 720x460 camera frames from the decoder model. To keep run time down, it shortens the flap divider to 100,000 clocks and the debounce to 1,000 clocks, and raises the duck speed to 40.
  - It checks that the cursor follows the spot, that the red dot appears on the VGA output, and that the camera view matches the scene.
  - It checks a miss, a hit, the landing and a fly-away.
  - It counts frame-buffer write retries, scanner stalls, completed scans, wing flaps, top bounces, misses, hits, landings, fly-aways and checked pixels. It fails if any of them never happened.
- `tb_duck_hunt_top_full` runs the design with every parameter at its default. A camera frame is captured, stored, scanned and analysed. The cursor lands on the spot, the camera view is checked, the trigger is pulled over the duck, and the duck dies with its score bit set. It runs in under a minute.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` at the end. The simulator is two-state, so
registers start at random values. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/duck_hunt_pkg.sv rtl/video_pkg.sv tb/tb_duck_hunt_top_full.sv --top-module tb_duck_hunt_top_full
    ./obj_dir/Vtb_duck_hunt_top_full +verilator+rand+reset+2

Run times on one core:
- the block testbenches: seconds each;
- `tb_duck_hunt_top_full`: under a minute;
- `tb_duck_hunt_top`: about four minutes. It simulates about 150 million clocks, because the fly-away needs over a hundred game frames.

To build the design for hardware, replace `frame_buffer` with an interface to the two 512K x 36 ZBT
SRAMs using the same timing. Add the decoder chip's I2C set-up at the top.
